// sync_ram: one-read, one-write static RAM used for the local data RAM, the
// local coefficient RAM of every AAU and the global RAM.
//
// Synchronous read: the word at raddr is on rdata in the cycle after re was
// high (rdata holds otherwise). Synchronous write on we. A read of the word
// being written in the same cycle returns the old contents. The architecture
// asks for fully static 16-bit RAMs (256 or 512 words); the separate read
// and write ports, so that the store stage can write while the decode cycle
// reads, are this design's choice. Contents are cleared at start-up for
// simulation; no reset clears them.
module sync_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 256,
  localparam int unsigned ABITS = (DEPTH > 1) ? $clog2(DEPTH) : 1
)(
  input  logic             clk,
  input  logic             re,
  input  logic [ABITS-1:0] raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [ABITS-1:0] waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
