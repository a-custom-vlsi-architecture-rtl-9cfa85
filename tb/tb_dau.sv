// tb_dau: check of the Distortion Arithmetic Unit.
//
// Search mode: three searches over 256 random (inner product, energy) pairs,
// one per cycle, with default scales (-2, 1) and with loaded gain scales. The
// model computes every distortion, the running minimum and so which inputs
// must raise newmin, one cycle after they enter, with their index on cmp_idx.
// Energy mode: groups of four rows are squared and summed; the scaled sum
// must appear once per group, one cycle after the last row.
module tb_dau;
  import vxc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  daumode_e mode;
  logic signed [15:0] ip, energy, gword;
  logic [10:0] idx_in, cmp_idx;
  logic row_first, row_last, clrmin, ldgm, ldgs, newmin, energy_valid;
  logic [4:0] dshamt;
  logic signed [33:0] dist_q, min_q;
  logic signed [15:0] energy_q;

  int checks = 0, failures = 0;

  dau dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic signed [15:0] ips[256], ens[256];
  logic exp_new[256];

  task automatic run_search(logic signed [15:0] m2g, logic signed [15:0] g2);
    logic signed [33:0] d, dmin;
    int best, seen_new;
    dmin = {1'b0, {33{1'b1}}};
    best = 0;
    for (int i = 0; i < 256; i++) begin
      ips[i] = 16'($signed($urandom_range(8000)) - 4000);
      ens[i] = 16'($urandom_range(6000));
      d = 34'(32'(ips[i]) * 32'(m2g)) + 34'(32'(ens[i]) * 32'(g2));
      exp_new[i] = (d < dmin);
      if (d < dmin) begin dmin = d; best = i; end
    end
    @(negedge clk);
    clrmin = 1;
    @(negedge clk);
    clrmin = 0;
    seen_new = 0;
    for (int i = 0; i < 256; i++) begin
      mode = DAU_SEARCH; ip = ips[i]; energy = ens[i]; idx_in = 11'(i);
      @(negedge clk);
      // input i entered stage 1 at the last edge; the compare stage shows it now
      check(newmin == exp_new[i], $sformatf("newmin for %0d: %b exp %b", i, newmin, exp_new[i]));
      if (newmin) begin
        check(cmp_idx == 11'(i), $sformatf("cmp_idx %0d exp %0d", cmp_idx, i));
        seen_new++;
      end
    end
    check(seen_new >= 1, "at least one new minimum");
    mode = DAU_NONE;
    @(negedge clk);
    check(min_q == dmin, $sformatf("minimum %0d exp %0d (best %0d)", min_q, dmin, best));
  endtask

  initial begin
    mode = DAU_NONE; ip = 0; energy = 0; gword = 0; idx_in = 0;
    row_first = 0; row_last = 0; clrmin = 0; ldgm = 0; ldgs = 0; dshamt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_search(-16'sd2, 16'sd1);
    // load gain scales -2G and G^2 for G = 5
    @(negedge clk); ldgm = 1; gword = -16'sd10;
    @(negedge clk); ldgm = 0; ldgs = 1; gword = 16'sd25;
    @(negedge clk); ldgs = 0;
    run_search(-16'sd10, 16'sd25);
    run_search(-16'sd10, 16'sd25);

    // energy mode
    for (int g = 0; g < 20; g++) begin
      logic signed [33:0] e;
      logic signed [33:0] es;
      e = 0;
      dshamt = 5'($urandom_range(12));
      for (int r = 0; r < 4; r++) begin
        @(negedge clk);
        if (r > 0) check(!energy_valid, "no energy store before the last row");
        mode = DAU_ENERGY; row_first = (r == 0); row_last = (r == 3);
        ip = 16'($signed($urandom_range(20000)) - 10000);
        e += 34'(32'(ip) * 32'(ip));
      end
      @(negedge clk);
      mode = DAU_NONE; row_first = 0; row_last = 0;
      es = e >>> dshamt;
      check(energy_valid, "energy store strobe after the last row");
      check(energy_q == es[15:0], $sformatf("energy %0d exp %0d", energy_q, es[15:0]));
      // a search cycle between groups must not disturb the energy sum
      mode = DAU_SEARCH; ip = 1; energy = 1;
      @(negedge clk);
      mode = DAU_NONE;
      check(!energy_valid, "single energy strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
