// tb_vxc_top: end-to-end test of the coder processor at its default size.
//
// The host port loads the global RAM (filter rows, FIR taps, lattice
// coefficients, search target, gains, input samples) while reset is held.
// The stored microprogram then copies the coefficients into the local RAMs,
// and computes the energies of all 256 filtered codevectors (FILTER CODEBOOK,
// 1024 issues). A first vector interrupt arrives in the middle of that loop:
// the interrupt routine runs a codebook search (SEARCH CODEBOOK, 256 issues),
// sends out the index, runs a 4-tap FIR over 16 samples (FILTER I, then
// FILTER II), a STORE DATA / LOAD DATA & COEFF / SUM OF PRODUCTS /
// magnitude-square sequence and four samples of a 4-stage lattice filter, and
// returns into the interrupted loop. A second interrupt, after the energy
// table is complete, repeats the routine. Every result is compared with a
// fixed-point model written here from the arithmetic definitions; the search
// and codebook-filtering issue counts are checked against one cycle per
// codevector and one cycle per codevector row.
module tb_vxc_top;
  import vxc_pkg::*;

  localparam int EBASE = 'h000, TGT = 'h100, GM = 'h104, GS = 'h105, HG = 'h108,
                 TAPG = 'h118, KG = 'h11C, XIN = 'h120, LIN = 'h130, SOPO = 'h140,
                 SQRO = 'h141, FOUT = 'h150, LOUT = 'h160;
  localparam int DONE_PC = 31;

  logic clk = 1'b0, rst_n = 1'b0, vector_irq = 1'b0;
  logic host_we = 1'b0;
  logic [AW-1:0] host_addr = '0;
  logic [DW-1:0] host_wdata = '0;
  logic host_ready, index_valid, int_active;
  logic [IDXW-1:0] index_out;
  logic [PCW-1:0] pc;

  int checks = 0, failures = 0;
  longint cyc = 0;

  vxc_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- reference model ----------------
  function automatic logic signed [15:0] cb(int lane, int i);
    logic [31:0] h0, h1, h2;
    h0 = 32'(i) * 32'd2654435761 + 32'(lane) * 32'd40503 + 32'd40503;
    h1 = (h0 ^ (h0 >> 13)) * 32'd1540483477;
    h2 = h1 ^ (h1 >> 15);
    return $signed(h2[15:0]) >>> 3;
  endfunction

  function automatic logic signed [15:0] tr(logic signed [33:0] v, int sh);
    logic signed [33:0] s;
    s = v >>> sh;
    return s[15:0];
  endfunction

  logic signed [15:0] h[4], tgt[4], taps[4], kk[4], x[16], f0[4];
  logic signed [15:0] gm = -16'sd6, gs = 16'sd9;
  logic signed [15:0] e_model[256];
  logic signed [15:0] fir_exp[16], lat_exp[4], sop_exp, sqr_exp;

  function automatic logic signed [15:0] hrow(int n, int j);
    return (n >= j) ? h[n-j] : 16'sd0;
  endfunction

  task automatic build_model();
    logic signed [31:0] acc, prev;
    logic signed [33:0] e;
    logic signed [15:0] y, b[4], fst[4], bst[4];
    for (int cv = 0; cv < 256; cv++) begin
      e = 0;
      for (int n = 0; n < 4; n++) begin
        acc = 0;
        for (int j = 0; j < 4; j++) acc += 32'(hrow(n, j)) * 32'(cb(j, cv));
        y = tr(34'(acc), 12);
        e += 34'(32'(y) * 32'(y));
      end
      e_model[cv] = tr(e, 12);
    end
    prev = 0;
    for (int n = 0; n < 16; n++) begin
      acc = 0;
      for (int j = 0; j < 4; j++) if (n - j >= 0) acc += 32'(taps[j]) * 32'(x[n-j]);
      if (n >= 8) acc += prev;
      prev = acc;
      fir_exp[n] = tr(34'(acc), 12);
    end
    acc = 0;
    for (int j = 0; j < 4; j++) acc += 32'(taps[j]) * 32'(x[15-j]);
    sop_exp = tr(34'(acc), 12);
    acc = 0;
    for (int j = 0; j < 4; j++) acc += 32'(x[15-j]) * 32'(x[15-j]);
    sqr_exp = tr(34'(acc), 12);
    for (int j = 0; j < 4; j++) b[j] = 0;
    for (int n = 0; n < 4; n++) begin
      acc = 32'(f0[n]) <<< 12;
      for (int j = 0; j < 4; j++) begin
        acc += 32'(kk[j]) * 32'(b[j]);
        fst[j] = tr(34'(acc), 12);
      end
      lat_exp[n] = fst[3];
      for (int j = 0; j < 4; j++)
      begin
        acc = (32'(b[j]) <<< 12) + 32'(kk[j]) * 32'(j == 0 ? f0[n] : fst[j-1]);
        bst[j] = tr(34'(acc), 12);
      end
      for (int j = 0; j < 4; j++) b[j] = (j == 0) ? f0[n] : bst[j-1];
    end
  endtask

  function automatic int best_index(logic signed [15:0] en[256]);
    logic signed [33:0] d, dmin;
    logic signed [31:0] acc;
    logic signed [15:0] ip;
    int best;
    dmin = {1'b0, {33{1'b1}}};
    best = 0;
    for (int cv = 0; cv < 256; cv++) begin
      acc = 0;
      for (int j = 0; j < 4; j++) acc += 32'(tgt[j]) * 32'(cb(j, cv));
      ip = tr(34'(acc), 12);
      d = 34'(32'(ip) * 32'(gm)) + 34'(32'(en[cv]) * 32'(gs));
      if (d < dmin) begin
        dmin = d;
        best = cv;
      end
    end
    return best;
  endfunction

  // ---------------- host port ----------------
  task automatic hwrite(int a, logic signed [15:0] v);
    host_we <= 1'b1; host_addr <= AW'(a); host_wdata <= v;
    @(posedge clk);
  endtask

  function automatic logic signed [15:0] rnd(int mag);
    return 16'($signed($urandom_range(2*mag)) - mag);
  endfunction

  // ---------------- mechanism counters ----------------
  int n_srch, n_fcb, n_filt1, n_filt2, n_latf, n_latb, n_sop, n_sqr, n_std, n_stdc,
      n_lddc, n_newmin, n_int_in_rpt, n_reti, n_host_stall;
  always @(posedge clk) if (rst_n) begin
    if (!dut.u_ctl.take_int) begin
      unique case (dut.iword[15:9])
        OP_SRCH:  n_srch++;
        OP_FCB:   n_fcb++;
        OP_FILT1: n_filt1++;
        OP_FILT2: n_filt2++;
        OP_LATF:  n_latf++;
        OP_LATB:  n_latb++;
        OP_SOP:   n_sop++;
        OP_SQR:   n_sqr++;
        OP_STD:   n_std++;
        OP_STDC:  n_stdc++;
        OP_LDDC:  n_lddc++;
        OP_RETI:  n_reti++;
        default: ;
      endcase
    end
    if (dut.u_ctl.take_int && dut.u_ctl.rpt_cnt != 0) n_int_in_rpt++;
    if (dut.newmin) n_newmin++;
    if (!host_ready) n_host_stall++;
  end

  task automatic check_isr_results(string tag);
    for (int n = 0; n < 16; n++)
      check($signed(dut.u_gram.mem[FOUT+n]) == fir_exp[n],
            $sformatf("%s FIR out %0d: %0d exp %0d", tag, n, $signed(dut.u_gram.mem[FOUT+n]), fir_exp[n]));
    check($signed(dut.u_gram.mem[SOPO]) == sop_exp, $sformatf("%s SOP %0d exp %0d", tag, $signed(dut.u_gram.mem[SOPO]), sop_exp));
    check($signed(dut.u_gram.mem[SQRO]) == sqr_exp, $sformatf("%s SQR %0d exp %0d", tag, $signed(dut.u_gram.mem[SQRO]), sqr_exp));
    for (int n = 0; n < 4; n++)
      check($signed(dut.u_gram.mem[LOUT+n]) == lat_exp[n],
            $sformatf("%s lattice out %0d: %0d exp %0d", tag, n, $signed(dut.u_gram.mem[LOUT+n]), lat_exp[n]));
  endtask

  logic signed [15:0] snap[256];
  int exp_idx, s0, fcb_before;
  longint t_irq, t_idx;

  initial begin
    h = '{16'sd2048, 16'sd1024, -16'sd512, 16'sd256};
    for (int j = 0; j < 4; j++) begin
      tgt[j]  = rnd(3000);
      taps[j] = rnd(2048);
      kk[j]   = rnd(3000);
      f0[j]   = rnd(4000);
    end
    for (int n = 0; n < 16; n++) x[n] = rnd(4000);
    build_model();

    repeat (3) @(posedge clk);
    // global RAM image; lane j of a 4-word vector sits at base + 3 - j
    for (int n = 0; n < 4; n++)
      for (int j = 0; j < 4; j++) hwrite(HG + 4*n + 3 - j, hrow(n, j));
    for (int j = 0; j < 4; j++) begin
      hwrite(TAPG + 3 - j, taps[j]);
      hwrite(KG + 3 - j, kk[j]);
      hwrite(TGT + 3 - j, tgt[j]);
      hwrite(LIN + j, f0[j]);
    end
    for (int n = 0; n < 16; n++) hwrite(XIN + n, x[n]);
    hwrite(GM, gm);
    hwrite(GS, gs);
    host_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;

    // first vector interrupt in the middle of codebook filtering
    wait (n_fcb >= 300);
    @(posedge clk);
    fcb_before = n_fcb;
    vector_irq <= 1'b1;
    @(posedge clk);
    vector_irq <= 1'b0;
    t_irq = cyc;
    wait (int_active);
    s0 = n_srch;
    check(n_fcb < 1024, "interrupt arrived inside the codebook-filtering loop");
    @(posedge clk iff index_valid);
    t_idx = cyc;
    for (int i = 0; i < 256; i++) snap[i] = $signed(dut.u_gram.mem[EBASE+i]);
    exp_idx = best_index(snap);
    check(index_out == IDXW'(exp_idx), $sformatf("index during update: %0d exp %0d", index_out, exp_idx));
    check(n_srch - s0 == 256, $sformatf("search issues %0d exp 256", n_srch - s0));
    for (int i = 0; i < (n_fcb >> 2) - 1; i++)
      check(snap[i] == e_model[i], $sformatf("partial energy %0d: %0d exp %0d", i, snap[i], e_model[i]));
    wait (!int_active);
    check_isr_results("irq1");

    // codebook filtering resumes and completes
    wait (pc == PCW'(DONE_PC));
    repeat (8) @(posedge clk);
    check(n_fcb == 1024, $sformatf("codebook filtering issues %0d exp 1024", n_fcb));
    for (int i = 0; i < 256; i++)
      check($signed(dut.u_gram.mem[EBASE+i]) == e_model[i],
            $sformatf("energy %0d: %0d exp %0d", i, $signed(dut.u_gram.mem[EBASE+i]), e_model[i]));

    // second vector: full table
    vector_irq <= 1'b1;
    @(posedge clk);
    vector_irq <= 1'b0;
    s0 = n_srch;
    @(posedge clk iff index_valid);
    exp_idx = best_index(e_model);
    check(index_out == IDXW'(exp_idx), $sformatf("index: %0d exp %0d", index_out, exp_idx));
    check(n_srch - s0 == 256, $sformatf("search issues %0d exp 256", n_srch - s0));
    wait (!int_active);
    repeat (4) @(posedge clk);
    check_isr_results("irq2");
    check(pc == PCW'(DONE_PC), "returned to the idle loop");

    // every mechanism happened
    check(n_int_in_rpt >= 1, "interrupt taken inside a REPEAT loop");
    check(n_reti == 2, $sformatf("returns from interrupt %0d", n_reti));
    check(n_newmin >= 2, "new minimum distortion found");
    check(n_filt1 == 16 && n_filt2 == 16, "FILTER I and FILTER II issued");
    check(n_latf == 8 && n_latb == 8, "lattice forward and backward issued");
    check(n_sop == 2 && n_sqr == 2, "SUM OF PRODUCTS and magnitude square issued");
    check(n_std == 2 && n_lddc == 2 && n_stdc >= 7, "STORE DATA, LOAD DATA & COEFF issued");
    check(n_host_stall >= 1, "host port held off by an internal global write");
    $display("mechanisms: srch=%0d fcb=%0d filt1=%0d filt2=%0d latf=%0d latb=%0d sop=%0d sqr=%0d std=%0d stdc=%0d lddc=%0d newmin=%0d int_in_rpt=%0d reti=%0d host_stall=%0d",
             n_srch, n_fcb, n_filt1, n_filt2, n_latf, n_latb, n_sop, n_sqr, n_std, n_stdc, n_lddc,
             n_newmin, n_int_in_rpt, n_reti, n_host_stall);
    $display("cycles: irq to index %0d, total %0d", t_idx - t_irq, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
