// tb_sync_ram: random reads and writes on a 256-word and a 512-word RAM
// against an array model: one-cycle read latency, data held while re is low,
// old contents returned when the same word is written in the read cycle.
module tb_sync_ram;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // 256-word local RAM and 512-word global RAM
  logic re_a, we_a, re_b, we_b;
  logic [7:0] ra_a, wa_a;
  logic [8:0] ra_b, wa_b;
  logic [15:0] wd_a, rd_a, wd_b, rd_b;

  sync_ram #(.WIDTH(16), .DEPTH(256)) u_a (.clk, .re(re_a), .raddr(ra_a), .rdata(rd_a),
                                           .we(we_a), .waddr(wa_a), .wdata(wd_a));
  sync_ram #(.WIDTH(16), .DEPTH(512)) u_b (.clk, .re(re_b), .raddr(ra_b), .rdata(rd_b),
                                           .we(we_b), .waddr(wa_b), .wdata(wd_b));

  logic [15:0] ma[256], mb[512];
  logic [15:0] ea, eb;

  initial begin
    for (int i = 0; i < 256; i++) ma[i] = 0;
    for (int i = 0; i < 512; i++) mb[i] = 0;
    re_a = 0; we_a = 0; re_b = 0; we_b = 0;
    ra_a = 0; wa_a = 0; ra_b = 0; wa_b = 0; wd_a = 0; wd_b = 0;
    @(negedge clk);
    re_a = 1; re_b = 1;
    @(negedge clk);
    ea = 0; eb = 0;
    for (int it = 0; it < 6000; it++) begin
      re_a = 1'($urandom); we_a = 1'($urandom);
      ra_a = 8'($urandom); wa_a = ($urandom_range(3) == 0) ? ra_a : 8'($urandom); wd_a = 16'($urandom);
      re_b = 1'($urandom); we_b = 1'($urandom);
      ra_b = 9'($urandom); wa_b = ($urandom_range(3) == 0) ? ra_b : 9'($urandom); wd_b = 16'($urandom);
      if (re_a) ea = ma[ra_a];
      if (re_b) eb = mb[ra_b];
      if (we_a) ma[wa_a] = wd_a;
      if (we_b) mb[wa_b] = wd_b;
      @(negedge clk);
      check(rd_a == ea, $sformatf("256-word read %h exp %h", rd_a, ea));
      check(rd_b == eb, $sformatf("512-word read %h exp %h", rd_b, eb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
