// vxc_top: vector-excitation speech coder processor.
//
// A chain of NAAU Adaptive Arithmetic Units (one per vector component) is
// pipelined with one Distortion Arithmetic Unit and run by a microcoded
// control unit from a 2K-word program ROM:
//  * every AAU has a local data RAM, a local coefficient RAM (both read at the
//    same address in all AAUs in parallel) and a codevector ROM holding its
//    component of every codevector;
//  * the data registers form a delay line (first AAU fed from global RAM) and
//    the adders form a sum-of-products chain; the last AAU's accumulator feeds
//    the DAU and is the one stored to global RAM;
//  * the DAU turns the chain's inner product and a precomputed codevector
//    energy (global RAM) into a distortion and keeps the minimum; the control
//    unit's index-save register holds the winning codevector index, sent out
//    on index_out/index_valid by the program.
//  * the global RAM (512 words) holds codevector energies and vectors shared
//    by all units; a host port writes it (input samples, parameters) when no
//    unit writes it (host_ready).
// A rising edge on vector_irq (one per input vector) interrupts the program.
//
// Timing: one instruction per clock, pipelined over issue / load / execute /
// store (+2 DAU stages); see control_unit. Global RAM write priority: DAU
// energy store, then the last AAU's store stage, then the host. The program
// must not schedule the first two in the same cycle (asserted).
module vxc_top
  import vxc_pkg::*;
#(
  parameter int unsigned NAAU       = 4,     // AAUs in the chain (= vector dimension)
  parameter int unsigned LRAM_DEPTH = 256,   // words per local data / coef RAM
  parameter int unsigned GRAM_DEPTH = 512,   // words of global RAM
  parameter int unsigned CB_DEPTH   = 256,   // codevectors (words per codevector ROM)
  parameter int unsigned PROG_DEPTH = 2048,  // program ROM words
  parameter string       PROG_FILE  = "rtl/vxc_program.hex"
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vector_irq,
  // host write port into global RAM
  input  logic                 host_we,
  input  logic [AW-1:0]        host_addr,
  input  logic [DW-1:0]        host_wdata,
  output logic                 host_ready,
  // coder output
  output logic [IDXW-1:0]      index_out,
  output logic                 index_valid,
  // status
  output logic [PCW-1:0]       pc,
  output logic                 int_active
);

  localparam int unsigned LAB = $clog2(LRAM_DEPTH);
  localparam int unsigned GAB = $clog2(GRAM_DEPTH);
  localparam int unsigned CAB = $clog2(CB_DEPTH);
  localparam int unsigned PAB = $clog2(PROG_DEPTH);

  // control
  logic [DW-1:0]   iword;
  rd_ctrl_t        rd;
  logic [AW-1:0]   lram_raddr, cram_raddr, gram_raddr;
  logic [IDXW-1:0] rom_raddr;
  logic            clrmin;
  l_ctrl_t         lc;
  e_ctrl_t         ec;
  s_ctrl_t         sc;
  logic [AW-1:0]   e_laddr, s_laddr, s_gaddr, d2_gaddr;
  daumode_e        d1_mode;
  logic [IDXW-1:0] d1_idx, cmp_idx;
  logic            d1_first, d1_last, newmin;
  logic [SHW-1:0]  shamt, dshamt;

  // datapath
  logic signed [DW-1:0]   data_q [NAAU];
  logic signed [DW-1:0]   acc_st [NAAU];
  logic signed [ACCW-1:0] sum_out[NAAU];
  logic signed [ACCW-1:0] acc_q  [NAAU];
  logic signed [ACCW-1:0] sum0;
  logic signed [DW-1:0]   gram_rdata, g_e, g_s;
  logic signed [DW-1:0]   energy_q;
  logic                   energy_valid;
  logic                   s_gwe;
  logic                   gwe;
  logic [AW-1:0]          gwaddr;
  logic [DW-1:0]          gwdata;

  program_rom #(.DEPTH(PROG_DEPTH), .INIT_FILE(PROG_FILE)) u_prog (
    .addr(pc[PAB-1:0]), .data(iword)
  );

  control_unit #(.NAAU(NAAU)) u_ctl (
    .clk, .rst_n, .irq(vector_irq),
    .pc, .iword,
    .rd, .lram_raddr, .cram_raddr, .rom_raddr, .gram_raddr, .clrmin,
    .lc, .ec, .e_laddr, .sc, .s_laddr, .s_gaddr,
    .d1_mode, .d1_idx, .d1_first, .d1_last, .d2_gaddr,
    .newmin, .cmp_idx, .shamt, .dshamt,
    .index_out, .index_valid, .int_active
  );

  // global word pipeline: read data in the load stage, then execute, then DAU
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_e <= '0;
      g_s <= '0;
    end else begin
      g_e <= gram_rdata;
      g_s <= g_e;
    end
  end

  // partial-sum input of the first AAU
  always_comb begin
    unique case (ec.s0sel)
      S0_LASTACC: sum0 = acc_q[NAAU-1];
      S0_GLOBAL:  sum0 = ACCW'(g_e) <<< shamt;
      default:    sum0 = '0;
    endcase
  end

  for (genvar i = 0; i < NAAU; i++) begin : g_lane
    logic signed [DW-1:0] lram_rdata, cram_rdata, rom_rdata;
    logic signed [DW-1:0] chain_d, chain_a;
    logic signed [ACCW-1:0] chain_s;
    logic                 lwe, cwe;
    logic [LAB-1:0]       lwaddr, cwaddr;
    logic [DW-1:0]        lwdata, cwdata;

    if (i == 0) begin : g_first
      assign chain_d = gram_rdata;
      assign chain_a = gram_rdata;
      assign chain_s = sum0;
    end else begin : g_next
      assign chain_d = data_q[i-1];
      assign chain_a = acc_st[i-1];
      assign chain_s = sum_out[i-1];
    end

    // execute-stage STORE DATA has priority over a store-stage accumulator write
    assign lwe    = ec.wr_dreg_l || sc.wr_acc_l;
    assign lwaddr = ec.wr_dreg_l ? e_laddr[LAB-1:0] : s_laddr[LAB-1:0];
    assign lwdata = ec.wr_dreg_l ? data_q[i] : acc_st[i];
    assign cwe    = ec.wr_dreg_c || sc.wr_acc_c;
    assign cwaddr = ec.wr_dreg_c ? e_laddr[LAB-1:0] : s_laddr[LAB-1:0];
    assign cwdata = ec.wr_dreg_c ? data_q[i] : acc_st[i];

    sync_ram #(.WIDTH(DW), .DEPTH(LRAM_DEPTH)) u_lram (
      .clk, .re(rd.lram_re), .raddr(lram_raddr[LAB-1:0]), .rdata(lram_rdata),
      .we(lwe), .waddr(lwaddr), .wdata(lwdata)
    );

    sync_ram #(.WIDTH(DW), .DEPTH(LRAM_DEPTH)) u_cram (
      .clk, .re(rd.cram_re), .raddr(cram_raddr[LAB-1:0]), .rdata(cram_rdata),
      .we(cwe), .waddr(cwaddr), .wdata(cwdata)
    );

    codebook_rom #(.LANE(i), .DEPTH(CB_DEPTH)) u_rom (
      .clk, .re(rd.rom_re), .addr(rom_raddr[CAB-1:0]), .rdata(rom_rdata)
    );

    aau u_aau (
      .clk, .rst_n,
      .dsel(lc.dsel), .cload(lc.cload), .d2load(lc.d2load),
      .lram_rdata, .cram_rdata, .rom_rdata,
      .chain_data_in(chain_d), .chain_acc_in(chain_a),
      .msq(ec.msq), .asel(ec.asel), .acc_en(ec.acc_en), .sum_in(chain_s),
      .shamt,
      .data_q(data_q[i]), .coef_q(), .sum_out(sum_out[i]), .acc_q(acc_q[i]),
      .acc_st(acc_st[i])
    );
  end

  dau #(.IW(IDXW)) u_dau (
    .clk, .rst_n,
    .mode(d1_mode), .ip(acc_st[NAAU-1]), .energy(g_s), .idx_in(d1_idx),
    .row_first(d1_first), .row_last(d1_last),
    .clrmin, .ldgm(lc.ldgm), .ldgs(lc.ldgs), .gword(gram_rdata),
    .dshamt,
    .dist_q(), .min_q(), .newmin, .cmp_idx,
    .energy_q, .energy_valid
  );

  // global RAM write port
  assign s_gwe      = (sc.gw != GW_NONE);
  assign host_ready = !energy_valid && !s_gwe;
  always_comb begin
    if (energy_valid) begin
      gwe = 1'b1; gwaddr = d2_gaddr; gwdata = energy_q;
    end else if (s_gwe) begin
      gwe = 1'b1; gwaddr = s_gaddr;  gwdata = acc_st[NAAU-1];
    end else begin
      gwe = host_we; gwaddr = host_addr; gwdata = host_wdata;
    end
  end

  sync_ram #(.WIDTH(DW), .DEPTH(GRAM_DEPTH)) u_gram (
    .clk, .re(rd.gram_re), .raddr(gram_raddr[GAB-1:0]), .rdata(gram_rdata),
    .we(gwe), .waddr(gwaddr[GAB-1:0]), .wdata(gwdata)
  );

  a_gwrite: assert property (@(posedge clk) disable iff (!rst_n) !(energy_valid && s_gwe))
    else $error("DAU energy store and AAU global store in the same cycle");

endmodule
