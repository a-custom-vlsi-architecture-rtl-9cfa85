// tb_codebook_rom: reads all 256 codevector components from the ROMs of lanes
// 0 and 3 and compares them with the codebook formula evaluated here; checks
// the one-cycle read latency and that the output holds while re is low.
module tb_codebook_rom;
  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic re;
  logic [7:0] addr;
  logic signed [15:0] d0, d3;

  codebook_rom #(.LANE(0)) u0 (.clk, .re, .addr, .rdata(d0));
  codebook_rom #(.LANE(3)) u3 (.clk, .re, .addr, .rdata(d3));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [15:0] cb(int lane, int i);
    logic [31:0] h0, h1, h2;
    h0 = 32'(i) * 32'd2654435761 + 32'(lane) * 32'd40503 + 32'd40503;
    h1 = (h0 ^ (h0 >> 13)) * 32'd1540483477;
    h2 = h1 ^ (h1 >> 15);
    return $signed(h2[15:0]) >>> 3;
  endfunction

  initial begin
    int distinct;
    re = 0; addr = 0;
    @(negedge clk);
    distinct = 0;
    for (int i = 0; i < 256; i++) begin
      re = 1; addr = 8'(i);
      @(negedge clk);
      check(d0 == cb(0, i) && d3 == cb(3, i), $sformatf("cv %0d: %0d %0d exp %0d %0d", i, d0, d3, cb(0, i), cb(3, i)));
      check(d0 >= -16'sd4096 && d0 < 16'sd4096, "Q12 range");
      if (d0 != d3) distinct++;
    end
    check(distinct > 200, "lanes hold different components");
    re = 0; addr = 8'd7;
    @(negedge clk);
    check(d0 == cb(0, 255), "output held while re is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
