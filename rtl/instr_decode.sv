// instr_decode: instruction decoder of the control unit.
//
// Expands the 7-bit instruction field of a program word into the control
// points of the datapath, grouped by the pipeline stage that uses them: read
// requests issued in the decode cycle, load-stage register selects, execute-
// stage multiplier/adder selects and the store-stage write enables. The
// control points of all AAUs are driven in common; the first AAU differs only
// through its chain inputs, whose sources (global RAM, zero, previous partial
// sum) are chosen here as well.
//
// Purely combinational. Encodings are listed in vxc_pkg. Which control
// points each operation sets follows the architecture's instruction
// descriptions (LOAD DATA & COEFF, STORE DATA, SUM OF PRODUCTS, FILTER I/II,
// SEARCH CODEBOOK, FILTER CODEBOOK); the remaining operations (lattice steps,
// accumulator stores, register set-up, flow control) are this design's own.
module instr_decode
  import vxc_pkg::*;
(
  input  logic [OPW-1:0] op,
  output ctrl_t          ctrl
);

  always_comb begin
    ctrl = '0;
    ctrl.l.dsel  = D_HOLD;
    ctrl.e.asel  = A_ZERO;
    ctrl.e.s0sel = S0_ZERO;
    ctrl.e.dau   = DAU_NONE;
    ctrl.s.gw    = GW_NONE;
    unique casez (op)
      OP_NOP: ;
      OP_LDDC: begin
        ctrl.rd.lram_re = 1'b1; ctrl.rd.cram_re = 1'b1;
        ctrl.l.dsel = D_LOCAL;  ctrl.l.cload = 1'b1;
      end
      OP_LDD: begin
        ctrl.rd.lram_re = 1'b1; ctrl.l.dsel = D_LOCAL;
      end
      OP_LDC: begin
        ctrl.rd.cram_re = 1'b1; ctrl.l.cload = 1'b1;
      end
      OP_LDROM: begin
        ctrl.rd.rom_re = 1'b1; ctrl.l.dsel = D_ROM;
      end
      OP_SHIN: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.dsel = D_CHAIN;
      end
      OP_STD:  ctrl.e.wr_dreg_l = 1'b1;
      OP_STDC: ctrl.e.wr_dreg_c = 1'b1;
      OP_STA:  ctrl.s.wr_acc_l  = 1'b1;
      OP_STAC: ctrl.s.wr_acc_c  = 1'b1;
      OP_STG:  ctrl.s.gw = GW_ADDR;
      OP_SOP: begin
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_ZERO; ctrl.e.acc_en = 1'b1;
        ctrl.s.gw = GW_ADDR;
      end
      OP_SQR: begin
        ctrl.e.msq = 1'b1;
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_ZERO; ctrl.e.acc_en = 1'b1;
        ctrl.s.gw = GW_ADDR;
      end
      OP_FILT1: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.dsel = D_CHAIN;
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_ZERO; ctrl.e.acc_en = 1'b1;
        ctrl.s.gw = GW_WP;
      end
      OP_FILT2: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.dsel = D_CHAIN;
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_LASTACC; ctrl.e.acc_en = 1'b1;
        ctrl.s.gw = GW_WP;
      end
      OP_LATF: begin
        ctrl.rd.gram_re = 1'b1;
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_GLOBAL; ctrl.e.acc_en = 1'b1;
        ctrl.s.gw = GW_WP;
      end
      OP_LATB: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.dsel = D_ACCCH; ctrl.l.d2load = 1'b1;
        ctrl.e.asel = A_DATA2; ctrl.e.acc_en = 1'b1;
      end
      OP_LDACC: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.dsel = D_ACCCH;
      end
      OP_SRCH: begin
        ctrl.rd.rom_re = 1'b1; ctrl.rd.gram_re = 1'b1; ctrl.l.dsel = D_ROM;
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_ZERO; ctrl.e.acc_en = 1'b1;
        ctrl.e.dau = DAU_SEARCH;
      end
      OP_FCB: begin
        ctrl.rd.rom_re = 1'b1; ctrl.rd.cram_re = 1'b1; ctrl.rd.fcb_addr = 1'b1;
        ctrl.l.dsel = D_ROM; ctrl.l.cload = 1'b1;
        ctrl.e.asel = A_CHAIN; ctrl.e.s0sel = S0_ZERO; ctrl.e.acc_en = 1'b1;
        ctrl.e.dau = DAU_ENERGY;
        ctrl.f.fcb_wp = 1'b1;
      end
      OP_CLRMIN: ctrl.f.clrmin = 1'b1;
      OP_SETWP:  ctrl.f.setwp  = 1'b1;
      OP_SETSH:  ctrl.f.setsh  = 1'b1;
      OP_SETDSH: ctrl.f.setdsh = 1'b1;
      OP_LDGM: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.ldgm = 1'b1;
      end
      OP_LDGS: begin
        ctrl.rd.gram_re = 1'b1; ctrl.l.ldgs = 1'b1;
      end
      OP_OUTIDX: ctrl.f.outidx = 1'b1;
      OP_RPT:    ctrl.f.rpt    = 1'b1;
      OP_RPTV:   ctrl.f.rptv   = 1'b1;
      OP_EI:     ctrl.f.ei     = 1'b1;
      OP_DI:     ctrl.f.di     = 1'b1;
      OP_RETI:   ctrl.f.reti   = 1'b1;
      7'b10000??: ctrl.f.jmp   = 1'b1;
      default:   ctrl.illegal  = 1'b1;
    endcase
  end

endmodule
