// control_unit: program sequencing, instruction decoding and pipeline control.
//
// Each cycle the program word at the program counter (16 bits: 7-bit
// instruction field, 9-bit address field) is decoded and issued; every
// instruction takes one cycle. The decoded control points are then carried
// down a pipeline that matches the datapath:
//   cycle t   issue   - memory read addresses (address field + loop index)
//   cycle t+1 load    - AAU data/coefficient/DATA2 registers, DAU scale regs
//   cycle t+2 execute - multiply and chained add, accumulators load
//   cycle t+3 store   - shifted accumulators written; DAU distortion stage
//   cycle t+4         - DAU comparison, index-save register, energy store
// Software schedules around the exposed pipeline (no interlocks).
//
// Flow control, as in the architecture: REPEAT N holds the program counter
// for N issues of the next instruction; the loop counter doubles as an index
// added to the address field and selects the codevector (SEARCH CODEBOOK) or
// the codevector and filter row (FILTER CODEBOOK). An index-save register
// loads the loop index of a new minimum distortion; OUTIDX transmits it.
// A vector interrupt (rising edge of irq) is taken between issues when
// enabled: the program counter and the loop state go to save registers, the
// program counter jumps to IVEC and interrupts are disabled until RETI. The
// accumulators are saved by software. RPTV (repeat N*V), the interrupt vector,
// the write pointer for chained filter outputs and the saving of the loop
// state and write pointer with the program counter are this design's own
// choices.
module control_unit
  import vxc_pkg::*;
#(
  parameter int unsigned NAAU = 4,                // AAUs = vector dimension
  parameter logic [PCW-1:0] IVEC = PCW'(1)        // interrupt vector
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 irq,
  // program ROM
  output logic [PCW-1:0]       pc,
  input  logic [DW-1:0]        iword,
  // issue stage (t)
  output rd_ctrl_t             rd,
  output logic [AW-1:0]        lram_raddr,
  output logic [AW-1:0]        cram_raddr,
  output logic [IDXW-1:0]      rom_raddr,
  output logic [AW-1:0]        gram_raddr,
  output logic                 clrmin,
  // load stage (t+1)
  output l_ctrl_t              lc,
  // execute stage (t+2)
  output e_ctrl_t              ec,
  output logic [AW-1:0]        e_laddr,
  // store stage (t+3), also DAU distortion stage
  output s_ctrl_t              sc,
  output logic [AW-1:0]        s_laddr,
  output logic [AW-1:0]        s_gaddr,
  output daumode_e             d1_mode,
  output logic [IDXW-1:0]      d1_idx,
  output logic                 d1_first,
  output logic                 d1_last,
  // t+4: DAU comparison and energy store
  output logic [AW-1:0]        d2_gaddr,
  input  logic                 newmin,
  input  logic [IDXW-1:0]      cmp_idx,
  // shifter settings
  output logic [SHW-1:0]       shamt,
  output logic [SHW-1:0]       dshamt,
  // transmitted codebook index
  output logic [IDXW-1:0]      index_out,
  output logic                 index_valid,
  output logic                 int_active
);

  localparam int unsigned LOGV = (NAAU > 1) ? $clog2(NAAU) : 1;

  logic [OPW-1:0]  op;
  logic [AW-1:0]   field;
  ctrl_t           dc;
  ctrl_t           ic;           // issued control (bubble when not issuing)

  logic [IDXW:0]   rpt_cnt, cnt_save;
  logic [IDXW-1:0] rpt_idx, idx_save;
  logic [PCW-1:0]  pc_save;
  logic            ien, irq_q, irq_pend, take_int;
  logic [AW-1:0]   wp, wp_save;
  logic [IDXW-1:0] index_save;
  logic [IDXW-1:0] idx;          // loop index of the issued instruction
  logic [AW-1:0]   eaddr;
  logic [IDXW-1:0] row;
  logic            fcb_last;
  logic            alloc_wp;

  assign op    = iword[DW-1 -: OPW];
  assign field = iword[AW-1:0];

  instr_decode u_dec (.op(op), .ctrl(dc));

  // an interrupt is not taken on a REPEAT word itself
  assign take_int = irq_pend && ien && !dc.f.rpt && !dc.f.rptv;
  assign ic       = take_int ? '0 : dc;
  assign idx      = (rpt_cnt != '0) ? rpt_idx : '0;
  assign eaddr    = field + AW'(idx);
  assign row      = idx & IDXW'(NAAU - 1);
  assign fcb_last = (row == IDXW'(NAAU - 1));
  assign alloc_wp = (ic.s.gw == GW_WP) || (ic.f.fcb_wp && fcb_last);

  // issue-stage addresses
  assign rd         = ic.rd;
  assign lram_raddr = eaddr;
  assign cram_raddr = ic.rd.fcb_addr ? field + AW'(row) : eaddr;
  assign rom_raddr  = ic.rd.fcb_addr ? (idx >> LOGV) : idx;
  assign gram_raddr = eaddr;
  assign clrmin     = ic.f.clrmin;
  assign int_active = !ien;

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc         <= '0;
      rpt_cnt    <= '0;
      rpt_idx    <= '0;
      pc_save    <= '0;
      cnt_save   <= '0;
      idx_save   <= '0;
      ien        <= 1'b0;
      irq_q      <= 1'b0;
      irq_pend   <= 1'b0;
      wp         <= '0;
      wp_save    <= '0;
      shamt      <= SHW'(15);
      dshamt     <= SHW'(15);
      index_save <= '0;
      index_out  <= '0;
      index_valid <= 1'b0;
    end else begin
      irq_q       <= irq;
      index_valid <= 1'b0;
      if (irq && !irq_q) irq_pend <= 1'b1;

      if (take_int) begin
        irq_pend <= 1'b0;
        pc_save  <= pc;
        cnt_save <= rpt_cnt;
        idx_save <= rpt_idx;
        rpt_cnt  <= '0;
        rpt_idx  <= '0;
        ien      <= 1'b0;
        pc       <= IVEC;
      end else begin
        // program counter and loop counter
        if (dc.f.reti) begin
          pc      <= pc_save;
          rpt_cnt <= cnt_save;
          rpt_idx <= idx_save;
          ien     <= 1'b1;
        end else if (dc.f.jmp) begin
          pc      <= {op[1:0], field};
          rpt_cnt <= '0;
        end else if (rpt_cnt > (IDXW+1)'(1)) begin
          rpt_cnt <= rpt_cnt - 1'b1;
          rpt_idx <= rpt_idx + 1'b1;
        end else if (dc.f.rpt || dc.f.rptv) begin
          rpt_cnt <= dc.f.rptv ? (IDXW+1)'(field) << LOGV
                               : (IDXW+1)'(field);
          rpt_idx <= '0;
          pc      <= pc + 1'b1;
        end else begin
          rpt_cnt <= '0;
          rpt_idx <= '0;
          pc      <= pc + 1'b1;
        end
        if (dc.f.ei) ien <= 1'b1;
        if (dc.f.di) ien <= 1'b0;
        if (dc.f.setsh)  shamt  <= field[SHW-1:0];
        if (dc.f.setdsh) dshamt <= field[SHW-1:0];
        if (dc.f.outidx) begin
          index_out   <= index_save;
          index_valid <= 1'b1;
        end
      end

      if (take_int)      wp_save <= wp;
      if (dc.f.reti && !take_int) wp <= wp_save;
      else if (ic.f.setwp)  wp <= field;
      else if (alloc_wp)    wp <= wp + 1'b1;

      if (newmin) index_save <= cmp_idx;
    end
  end

  // pipeline registers
  l_ctrl_t         l_q;
  e_ctrl_t         e1_q, e_q;
  s_ctrl_t         s1_q, s2_q, s_q;
  logic [AW-1:0]   a1_q, a2_q, a3_q;      // address field + index
  logic [AW-1:0]   g1_q, g2_q, g3_q;      // global write address
  logic [AW-1:0]   w1_q, w2_q, w3_q, w4_q; // energy write address
  logic [IDXW-1:0] i1_q, i2_q, i3_q;
  logic            f1_q, f2_q, f3_q, t1_q, t2_q, t3_q;
  daumode_e        m3_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q  <= '0; e1_q <= '0; e_q <= '0;
      s1_q <= '0; s2_q <= '0; s_q <= '0;
      a1_q <= '0; a2_q <= '0; a3_q <= '0;
      g1_q <= '0; g2_q <= '0; g3_q <= '0;
      w1_q <= '0; w2_q <= '0; w3_q <= '0; w4_q <= '0;
      i1_q <= '0; i2_q <= '0; i3_q <= '0;
      f1_q <= 1'b0; f2_q <= 1'b0; f3_q <= 1'b0;
      t1_q <= 1'b0; t2_q <= 1'b0; t3_q <= 1'b0;
      m3_q <= DAU_NONE;
    end else begin
      // t+1
      l_q  <= ic.l;
      e1_q <= ic.e;
      s1_q <= ic.s;
      a1_q <= eaddr;
      g1_q <= (ic.s.gw == GW_WP) ? wp : eaddr;
      w1_q <= wp;
      i1_q <= idx;
      f1_q <= (row == '0);
      t1_q <= fcb_last;
      // t+2
      e_q  <= e1_q;
      s2_q <= s1_q;
      a2_q <= a1_q;
      g2_q <= g1_q;
      w2_q <= w1_q;
      i2_q <= i1_q;
      f2_q <= f1_q;
      t2_q <= t1_q;
      // t+3
      s_q  <= s2_q;
      a3_q <= a2_q;
      g3_q <= g2_q;
      w3_q <= w2_q;
      i3_q <= i2_q;
      f3_q <= f2_q;
      t3_q <= t2_q;
      m3_q <= e_q.dau;
      // t+4
      w4_q <= w3_q;
    end
  end

  assign lc       = l_q;
  assign ec       = e_q;
  assign e_laddr  = a2_q;
  assign sc       = s_q;
  assign s_laddr  = a3_q;
  assign s_gaddr  = g3_q;
  assign d1_mode  = m3_q;
  assign d1_idx   = i3_q;
  assign d1_first = f3_q;
  assign d1_last  = t3_q;
  assign d2_gaddr = w4_q;

  // an undefined instruction field is a programming error
  a_legal: assert property (@(posedge clk) disable iff (!rst_n) !dc.illegal)
    else $error("undefined instruction %h at pc %0d", iword, pc);

endmodule
