// tb_instr_decode: walks all 128 instruction-field values and compares the
// decoded control points that define each operation with a table written
// here from the operation descriptions; undefined values must be flagged.
module tb_instr_decode;
  import vxc_pkg::*;
  int checks = 0, failures = 0;
  logic [6:0] op;
  ctrl_t ctrl;

  instr_decode dut (.op, .ctrl);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: data source, coef load, adder select, first-AAU sum, acc enable,
  // global write, DAU mode, global read
  typedef struct {
    dsel_e d; bit c; asel_e a; s0sel_e s0; bit acc; gwsel_e gw; daumode_e m; bit gr; bit ill;
  } exp_t;

  function automatic exp_t expect_for(logic [6:0] o);
    exp_t e;
    e = '{D_HOLD, 0, A_ZERO, S0_ZERO, 0, GW_NONE, DAU_NONE, 0, 0};
    case (o)
      7'h00, 7'h06, 7'h07, 7'h08, 7'h09, 7'h15, 7'h16, 7'h17, 7'h18, 7'h1B, 7'h1C, 7'h1D,
      7'h1E, 7'h1F, 7'h20, 7'h40, 7'h41, 7'h42, 7'h43: ;
      7'h01: begin e.d = D_LOCAL; e.c = 1; end
      7'h02: e.d = D_LOCAL;
      7'h03: e.c = 1;
      7'h04: e.d = D_ROM;
      7'h05: begin e.d = D_CHAIN; e.gr = 1; end
      7'h0A: e.gw = GW_ADDR;
      7'h0B, 7'h0C: begin e.a = A_CHAIN; e.acc = 1; e.gw = GW_ADDR; end
      7'h0E: begin e.d = D_CHAIN; e.a = A_CHAIN; e.acc = 1; e.gw = GW_WP; e.gr = 1; end
      7'h0F: begin e.d = D_CHAIN; e.a = A_CHAIN; e.s0 = S0_LASTACC; e.acc = 1; e.gw = GW_WP; e.gr = 1; end
      7'h10: begin e.a = A_CHAIN; e.s0 = S0_GLOBAL; e.acc = 1; e.gw = GW_WP; e.gr = 1; end
      7'h11: begin e.d = D_ACCCH; e.a = A_DATA2; e.acc = 1; e.gr = 1; end
      7'h12: begin e.d = D_ACCCH; e.gr = 1; end
      7'h13: begin e.d = D_ROM; e.a = A_CHAIN; e.acc = 1; e.m = DAU_SEARCH; e.gr = 1; end
      7'h14: begin e.d = D_ROM; e.c = 1; e.a = A_CHAIN; e.acc = 1; e.m = DAU_ENERGY; end
      7'h19, 7'h1A: e.gr = 1;
      default: e.ill = 1;
    endcase
    return e;
  endfunction

  initial begin
    exp_t e;
    for (int i = 0; i < 128; i++) begin
      op = 7'(i);
      #1;
      e = expect_for(op);
      check(ctrl.l.dsel == e.d, $sformatf("op %h dsel", op));
      check(ctrl.l.cload == e.c, $sformatf("op %h cload", op));
      check(ctrl.e.asel == e.a, $sformatf("op %h asel", op));
      check(ctrl.e.s0sel == e.s0, $sformatf("op %h s0sel", op));
      check(ctrl.e.acc_en == e.acc, $sformatf("op %h acc_en", op));
      check(ctrl.s.gw == e.gw, $sformatf("op %h gw", op));
      check(ctrl.e.dau == e.m, $sformatf("op %h dau", op));
      check(ctrl.rd.gram_re == e.gr, $sformatf("op %h gram_re", op));
      check(ctrl.illegal == e.ill, $sformatf("op %h illegal", op));
    end
    op = OP_SQR;  #1 check(ctrl.e.msq, "SQR squares");
    op = OP_LATB; #1 check(ctrl.l.d2load, "LATB loads DATA2");
    op = OP_STD;  #1 check(ctrl.e.wr_dreg_l && !ctrl.e.wr_dreg_c, "STORE DATA to data RAM");
    op = OP_STAC; #1 check(ctrl.s.wr_acc_c, "STAC to coef RAM");
    op = OP_FCB;  #1 check(ctrl.rd.fcb_addr && ctrl.f.fcb_wp && ctrl.rd.cram_re, "FCB addressing");
    op = OP_RPTV; #1 check(ctrl.f.rptv && !ctrl.f.rpt, "RPTV");
    op = 7'h42;   #1 check(ctrl.f.jmp, "jump");
    op = OP_RETI; #1 check(ctrl.f.reti, "RETI");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
