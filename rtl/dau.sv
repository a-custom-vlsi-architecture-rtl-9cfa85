// dau: Distortion Arithmetic Unit, the codebook-search engine behind the AAU chain.
//
// Two pipeline stages:
//  * distortion - two 16x16 multipliers and an adder form
//                 d = (-2G) * <x,y> + (G^2) * |y|^2
//                 from the inner product computed by the AAU chain (ip) and
//                 the precomputed codevector energy read from global RAM. The
//                 term |x|^2 is constant over a search and is left out. With
//                 a gain-less codebook the two scale registers hold -2 and 1.
//  * comparison - d is compared with the minimum register; if smaller, it
//                 replaces the minimum and newmin pulses; the codevector
//                 index that produced it is on cmp_idx, from which the
//                 control unit's index-save register loads on that pulse.
// In energy mode (FILTER CODEBOOK) the first multiplier squares the chain
// output and the adder feeds back its own sum, forming |Hc|^2 over the rows
// of one codevector; after the last row the sum, scaled by the shifter
// (right shift by dshamt, low 16 bits kept), is presented on energy_q with
// energy_valid for one cycle.
//
// Timing: an input presented with mode=DAU_SEARCH in cycle t reaches the
// distortion register at the end of t and the minimum register at the end of
// t+1; newmin/cmp_idx are valid in cycle t+1 (combinational from stage 1).
// In energy mode, energy_valid is high in cycle t+1 after the last row.
// The energy accumulator is kept apart from the distortion register so that a
// search run from an interrupt does not disturb an energy sum in progress
// (this design's choice). Scale registers reset to -2 and 1 in Q0.
module dau
  import vxc_pkg::*;
#(
  parameter int unsigned IW = IDXW
)(
  input  logic                  clk,
  input  logic                  rst_n,
  input  daumode_e              mode,
  input  logic signed [DW-1:0]  ip,          // chain result (shifted word)
  input  logic signed [DW-1:0]  energy,      // codevector energy (search)
  input  logic [IW-1:0]         idx_in,      // codevector index
  input  logic                  row_first,   // energy mode: first row
  input  logic                  row_last,    // energy mode: last row
  input  logic                  clrmin,
  input  logic                  ldgm,
  input  logic                  ldgs,
  input  logic signed [DW-1:0]  gword,       // value for ldgm / ldgs
  input  logic [SHW-1:0]        dshamt,
  output logic signed [DISTW-1:0] dist_q,
  output logic signed [DISTW-1:0] min_q,
  output logic                  newmin,
  output logic [IW-1:0]         cmp_idx,     // index of the value being compared
  output logic signed [DW-1:0]  energy_q,
  output logic                  energy_valid
);

  logic signed [DW-1:0]    m2g_q, g2_q;
  logic signed [ACCW-1:0]  p_ip, p_en, p_sq;
  logic signed [DISTW-1:0] dist_d;
  logic signed [DISTW-1:0] eacc_q, eacc_d;
  logic signed [DISTW-1:0] eacc_sh;
  logic                    s1_valid;
  logic [IW-1:0]           s1_idx;
  logic                    e1_done;

  // scale registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m2g_q <= -16'sd2;
      g2_q  <= 16'sd1;
    end else begin
      if (ldgm) m2g_q <= gword;
      if (ldgs) g2_q  <= gword;
    end
  end

  // stage 1: distortion or energy accumulation
  assign p_ip   = ACCW'(ip) * ACCW'(m2g_q);
  assign p_en   = ACCW'(energy) * ACCW'(g2_q);
  assign p_sq   = ACCW'(ip) * ACCW'(ip);
  assign dist_d = DISTW'(p_ip) + DISTW'(p_en);
  assign eacc_d = (row_first ? '0 : eacc_q) + DISTW'(p_sq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dist_q   <= '0;
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      eacc_q   <= '0;
      e1_done  <= 1'b0;
    end else begin
      s1_valid <= (mode == DAU_SEARCH);
      e1_done  <= (mode == DAU_ENERGY) && row_last;
      if (mode == DAU_SEARCH) begin
        dist_q <= dist_d;
        s1_idx <= idx_in;
      end
      if (mode == DAU_ENERGY) eacc_q <= eacc_d;
    end
  end

  // stage 2: comparison against the minimum register
  assign newmin = s1_valid && (dist_q < min_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_q <= {1'b0, {(DISTW-1){1'b1}}};
    end else if (clrmin) begin
      min_q <= {1'b0, {(DISTW-1){1'b1}}};
    end else if (newmin) begin
      min_q <= dist_q;
    end
  end

  assign cmp_idx = s1_idx;

  assign eacc_sh      = eacc_q >>> dshamt;
  assign energy_q     = eacc_sh[DW-1:0];
  assign energy_valid = e1_done;

endmodule
