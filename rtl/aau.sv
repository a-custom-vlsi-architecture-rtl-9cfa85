// aau: Adaptive Arithmetic Unit, one tap / one vector component of the chain.
//
// Three pipeline stages, as in the architecture:
//  * load    - the data register is loaded from the local data RAM, the
//              codevector ROM, the previous AAU's data register (a delay line)
//              or the previous AAU's shifted accumulator; the coefficient
//              register from the local coefficient RAM; DATA2 takes the old
//              data register value.
//  * execute - one 16x16 signed multiply (data x coefficient, or data x data
//              for a magnitude square) and one add. The second adder input is
//              zero, the partial sum of the previous AAU (sum chain) or DATA2.
//              The sum leaves on sum_out combinationally, so a chain of N AAUs
//              forms an N-term sum of products in one cycle; it is also loaded
//              into this AAU's 32-bit accumulator.
//  * store   - a shifter scales the accumulator (arithmetic right shift by
//              shamt) and keeps the low 16 bits for storing (acc_st).
//
// DATA2 is added at the accumulator scale, i.e. shifted left by shamt, so a
// 16-bit word stored with shift shamt is added back at its own scale; this
// alignment is this design's choice. Memories are outside this module: the
// read data arrives on the *_rdata inputs during the load stage.
module aau
  import vxc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // load stage
  input  dsel_e                  dsel,
  input  logic                   cload,
  input  logic                   d2load,
  input  logic signed [DW-1:0]   lram_rdata,
  input  logic signed [DW-1:0]   cram_rdata,
  input  logic signed [DW-1:0]   rom_rdata,
  input  logic signed [DW-1:0]   chain_data_in,   // previous data register
  input  logic signed [DW-1:0]   chain_acc_in,    // previous shifted accumulator
  // execute stage
  input  logic                   msq,
  input  asel_e                  asel,
  input  logic                   acc_en,
  input  logic signed [ACCW-1:0] sum_in,
  // store stage
  input  logic [SHW-1:0]         shamt,
  // outputs
  output logic signed [DW-1:0]   data_q,
  output logic signed [DW-1:0]   coef_q,
  output logic signed [ACCW-1:0] sum_out,
  output logic signed [ACCW-1:0] acc_q,
  output logic signed [DW-1:0]   acc_st
);

  logic signed [DW-1:0]   data2_q;
  logic signed [DW-1:0]   mul_b;
  logic signed [ACCW-1:0] product;
  logic signed [ACCW-1:0] addend;
  logic signed [ACCW-1:0] data2_al;
  logic signed [ACCW-1:0] acc_sh;

  // load stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q  <= '0;
      coef_q  <= '0;
      data2_q <= '0;
    end else begin
      unique case (dsel)
        D_HOLD:  data_q <= data_q;
        D_LOCAL: data_q <= lram_rdata;
        D_ROM:   data_q <= rom_rdata;
        D_CHAIN: data_q <= chain_data_in;
        D_ACCCH: data_q <= chain_acc_in;
        default: data_q <= data_q;
      endcase
      if (cload)  coef_q  <= cram_rdata;
      if (d2load) data2_q <= data_q;
    end
  end

  // execute stage
  assign mul_b    = msq ? data_q : coef_q;
  assign product  = ACCW'(data_q) * ACCW'(mul_b);
  assign data2_al = ACCW'(data2_q) <<< shamt;

  always_comb begin
    unique case (asel)
      A_ZERO:  addend = '0;
      A_CHAIN: addend = sum_in;
      A_DATA2: addend = data2_al;
      default: addend = '0;
    endcase
  end

  assign sum_out = product + addend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc_q <= '0;
    else if (acc_en) acc_q <= sum_out;
  end

  // store stage: shifter, then truncation to one word
  assign acc_sh = acc_q >>> shamt;
  assign acc_st = acc_sh[DW-1:0];

endmodule
