// program_rom: global ROM holding the microprogram, 2K words of 16 bits.
//
// Each word is one instruction: bits 15:9 the instruction field, bits 8:0 the
// address field. Asynchronous read: the word at addr is on data in the same
// cycle, so the instruction at the program counter issues without a fetch
// stage and jumps take effect on the next cycle. The contents come from a hex
// file (one word per line), INIT_FILE; an empty name leaves the ROM all
// zeros (NOP). The 2K-word size follows the architecture. A synthesis flow
// that does not load INIT_FILE sees an all-zero ROM and reduces it to
// constants; give it the file (or a case table) to build the real ROM.
module program_rom #(
  parameter int unsigned DEPTH     = 2048,
  parameter string       INIT_FILE = "rtl/vxc_program.hex",
  localparam int unsigned ABITS    = $clog2(DEPTH)
)(
  input  logic [ABITS-1:0] addr,
  output logic [15:0]      data
);

  logic [15:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign data = rom[addr];

endmodule
