// tb_control_unit: runs a short program through the control unit alone.
//
// The program exercises REPEAT (with the loop index added to the address
// field), RPTV with FILTER CODEBOOK row/codevector addressing, the write
// pointer, the shifter setting, the index-save register and OUTIDX, and a
// vector interrupt taken in the middle of a 100-issue REPEAT loop, with
// return through RETI. A monitor records what was issued each cycle and
// checks that the load, execute, store and DAU controls appear exactly 1, 2,
// 3 and 3/4 cycles later with the right addresses, and that the interrupted
// loop still issues each index exactly once.
module tb_control_unit;
  import vxc_pkg::*;

  localparam logic [10:0] IV = 11'd20;

  logic clk = 1'b0, rst_n = 1'b0, irq = 1'b0;
  logic [10:0] pc;
  logic [15:0] iword;
  rd_ctrl_t rd;
  logic [8:0] lram_raddr, cram_raddr, gram_raddr, e_laddr, s_laddr, s_gaddr, d2_gaddr;
  logic [10:0] rom_raddr, d1_idx, cmp_idx, index_out;
  logic clrmin, d1_first, d1_last, newmin, index_valid, int_active;
  l_ctrl_t lc;
  e_ctrl_t ec;
  s_ctrl_t sc;
  daumode_e d1_mode;
  logic [4:0] shamt, dshamt;

  control_unit #(.NAAU(4), .IVEC(IV)) dut (.*);

  logic [15:0] prog [64];
  assign iword = prog[pc[5:0]];

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // issue history: op, address field + index, loop index, write pointer slot
  typedef struct { logic v; logic [6:0] op; logic [8:0] ea; logic [10:0] idx; } iss_t;
  iss_t h[5];
  int n_ldd, n_lddc, n_fcb, n_int_rpt, wp_exp, e_stores;
  bit seen_ldd[100];
  logic [8:0] fcb_w[$];

  always @(posedge clk) if (rst_n) begin
    iss_t cur;
    cur.v   = !dut.take_int;
    cur.op  = iword[15:9];
    cur.idx = dut.idx;
    cur.ea  = iword[8:0] + 9'(dut.idx);
    if (dut.take_int && dut.rpt_cnt != 0) n_int_rpt++;
    if (cur.v) begin
      if (cur.op == OP_LDD) begin
        n_ldd++;
        check(lram_raddr == cur.ea && rd.lram_re, "LDD read address");
        if (cur.idx < 100) begin
          check(!seen_ldd[int'(cur.idx)], $sformatf("loop index %0d issued twice", cur.idx));
          seen_ldd[int'(cur.idx)] = 1;
        end
      end
      if (cur.op == OP_LDDC) begin
        n_lddc++;
        check(lram_raddr == 9'h10 + 9'(n_lddc - 1) && cram_raddr == lram_raddr, "LDDC addresses");
      end
      if (cur.op == OP_FCB) begin
        check(rom_raddr == (cur.idx >> 2), $sformatf("FCB codevector %0d at idx %0d", rom_raddr, cur.idx));
        check(cram_raddr == 9'h08 + 9'(cur.idx & 3), "FCB coefficient row");
        n_fcb++;
      end
    end
    // load stage one cycle after issue
    check((lc.dsel == D_LOCAL) == (h[0].v && (h[0].op == OP_LDD || h[0].op == OP_LDDC)), "load stage select");
    // execute stage two cycles after issue
    check(ec.acc_en == (h[1].v && (h[1].op inside {OP_SOP, OP_FILT1, OP_FCB})), "execute stage accumulator enable");
    // store stage three cycles after issue
    if (h[2].v && h[2].op == OP_SOP) check(sc.gw == GW_ADDR && s_gaddr == h[2].ea, "SOP store address");
    if (h[2].v && h[2].op == OP_FILT1) begin
      check(sc.gw == GW_WP && s_gaddr == 9'(wp_exp), $sformatf("FILTER I store at %h exp %h", s_gaddr, wp_exp));
      wp_exp++;
    end
    if (!(h[2].v && h[2].op inside {OP_SOP, OP_FILT1})) check(sc.gw == GW_NONE, "no global store");
    // DAU stage one, three cycles after issue
    check((d1_mode == DAU_ENERGY) == (h[2].v && h[2].op == OP_FCB), "DAU energy mode");
    if (h[2].v && h[2].op == OP_FCB) check(d1_last == ((h[2].idx & 3) == 3) && d1_first == ((h[2].idx & 3) == 0), "row flags");
    // energy store address four cycles after issue of a last row
    if (h[3].v && h[3].op == OP_FCB && (h[3].idx & 3) == 3) begin
      check(d2_gaddr == 9'h52 + 9'(e_stores), $sformatf("energy store address %h", d2_gaddr));
      e_stores++;
    end
    for (int k = 4; k > 0; k--) h[k] = h[k-1];
    h[0] = cur;
  end

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = 16'h0000;
    prog[0]  = instr(OP_SETWP, 'h50);
    prog[1]  = instr(OP_RPT, 3);
    prog[2]  = instr(OP_LDDC, 'h10);
    prog[3]  = instr(OP_SOP, 'h20);
    prog[4]  = instr(OP_FILT1, 'h30);
    prog[5]  = instr(OP_FILT1, 'h30);
    prog[6]  = instr(OP_SETSH, 7);
    prog[7]  = instr(OP_RPTV, 2);
    prog[8]  = instr(OP_FCB, 'h08);
    prog[9]  = instr(OP_OUTIDX, 0);
    prog[10] = instr(OP_EI, 0);
    prog[11] = instr(OP_RPT, 100);
    prog[12] = instr(OP_LDD, 0);
    prog[13] = {OP_JMP0, 9'd13};
    prog[20] = instr(OP_SETWP, 'h70);
    prog[21] = instr(OP_FILT1, 0);
    prog[22] = instr(OP_RETI, 0);
    for (int k = 0; k < 5; k++) h[k] = '{0, 0, 0, 0};
    n_ldd = 0; n_lddc = 0; n_fcb = 0; n_int_rpt = 0; wp_exp = 'h50; e_stores = 0;
    newmin = 0; cmp_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // DAU reports a new minimum at index 77
    @(negedge clk);
    newmin = 1; cmp_idx = 11'd77;
    @(negedge clk);
    newmin = 0; cmp_idx = 11'd5;
    @(posedge clk iff index_valid);
    check(index_out == 11'd77, $sformatf("transmitted index %0d", index_out));
    check(shamt == 5'd7, "shifter amount set");
    check(n_fcb == 8, $sformatf("RPTV 2 gives 8 issues, got %0d", n_fcb));
    // interrupt in the middle of the LDD loop
    wait (n_ldd == 40);
    @(negedge clk);
    irq = 1;
    wp_exp = 'h70;
    @(negedge clk);
    irq = 0;
    wait (int_active);
    check(pc >= IV && pc <= IV + 2, "jumped to the interrupt vector");
    wait (!int_active);
    wait (pc == 11'd13);
    repeat (5) @(posedge clk);
    check(n_ldd == 100, $sformatf("loop issued %0d times, exp 100", n_ldd));
    for (int i = 0; i < 100; i++) check(seen_ldd[i], $sformatf("loop index %0d issued", i));
    check(n_int_rpt == 1, "interrupt taken inside the loop");
    check(n_lddc == 3, "REPEAT 3 gives 3 issues");
    check(e_stores == 2, "two energy stores");
    check(dut.wp == 9'h54, $sformatf("write pointer restored after RETI: %h", dut.wp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
