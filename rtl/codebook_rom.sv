// codebook_rom: codevector ROM of one AAU.
//
// Each AAU holds one component of every excitation codevector; with one AAU
// per vector component the 256-entry codebook needs 256 words per AAU. The
// trained codebook of the coder is not reproduced here: the table is filled at
// elaboration with a fixed pseudo-random codebook, component LANE of
// codevector i being
//     h0 = i*2654435761 + LANE*40503 + 40503
//     h1 = (h0 ^ (h0 >> 13)) * 1540483477
//     h2 = h1 ^ (h1 >> 15)
//     c  = signed(h2[15:0]) >>> 3            (Q12, about +-1.0)
// all in 32-bit unsigned arithmetic. Replace cb_word() to load a real codebook.
//
// Synchronous read: rdata holds ROM[addr] in the cycle after re.
module codebook_rom #(
  parameter int unsigned LANE  = 0,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned ABITS = (DEPTH > 1) ? $clog2(DEPTH) : 1
)(
  input  logic                    clk,
  input  logic                    re,
  input  logic [ABITS-1:0]        addr,
  output logic signed [15:0]      rdata
);

  typedef logic signed [15:0] table_t [DEPTH];

  function automatic logic signed [15:0] cb_word(int unsigned lane, int unsigned i);
    logic [31:0] h0, h1, h2;
    h0 = 32'(i) * 32'd2654435761 + 32'(lane) * 32'd40503 + 32'd40503;
    h1 = (h0 ^ (h0 >> 13)) * 32'd1540483477;
    h2 = h1 ^ (h1 >> 15);
    return $signed(h2[15:0]) >>> 3;
  endfunction

  function automatic table_t build();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++) t[i] = cb_word(LANE, i);
    return t;
  endfunction

  localparam table_t ROM = build();

  always_ff @(posedge clk) begin
    if (re) rdata <= ROM[addr];
  end

endmodule
