// vxc_pkg: shared widths, instruction encoding and control-word types of the
// vector-excitation coder processor (a chain of Adaptive Arithmetic Units, one
// Distortion Arithmetic Unit and a microcoded control unit).
//
// Widths that follow the architecture: 16-bit data words, 32-bit (double word)
// products and accumulators, 16-bit program words split into a 7-bit
// instruction field and a 9-bit address field, a 2K-word program ROM.
// The opcode values and the decoded control-word layout are this design's own
// choice; the architecture defines the operations (LOAD DATA & COEFF, STORE
// DATA, SUM OF PRODUCTS, FILTER I, FILTER II, SEARCH CODEBOOK, FILTER CODEBOOK,
// REPEAT N, interrupts) but not their encodings.
package vxc_pkg;

  localparam int DW    = 16;  // data word
  localparam int ACCW  = 32;  // double-length product / accumulator
  localparam int OPW   = 7;   // instruction field
  localparam int AW    = 9;   // address field (512-word spaces)
  localparam int PCW   = 11;  // 2K-word program ROM
  localparam int IDXW  = 11;  // loop index (up to 512*4 iterations)
  localparam int SHW   = 5;   // shifter amount
  localparam int DISTW = 34;  // distortion value width

  // Instruction field values.
  typedef enum logic [OPW-1:0] {
    OP_NOP    = 7'h00,
    OP_LDDC   = 7'h01,  // LOAD DATA & COEFF from local RAMs
    OP_LDD    = 7'h02,  // load data registers from local data RAM
    OP_LDC    = 7'h03,  // load coefficient registers from local coef RAM
    OP_LDROM  = 7'h04,  // load data registers from codevector ROM
    OP_SHIN   = 7'h05,  // shift data chain, first AAU from global RAM
    OP_STD    = 7'h06,  // STORE DATA: data registers -> local data RAM
    OP_STDC   = 7'h07,  // data registers -> local coef RAM
    OP_STA    = 7'h08,  // shifted accumulators -> local data RAM
    OP_STAC   = 7'h09,  // shifted accumulators -> local coef RAM
    OP_STG    = 7'h0A,  // last AAU shifted accumulator -> global RAM
    OP_SOP    = 7'h0B,  // SUM OF PRODUCTS, result -> global RAM
    OP_SQR    = 7'h0C,  // sum of magnitude squares, result -> global RAM
    OP_FILT1  = 7'h0E,  // FILTER I
    OP_FILT2  = 7'h0F,  // FILTER II
    OP_LATF   = 7'h10,  // lattice forward residuals
    OP_LATB   = 7'h11,  // lattice backward residuals
    OP_LDACC  = 7'h12,  // data registers <- accumulator chain
    OP_SRCH   = 7'h13,  // SEARCH CODEBOOK
    OP_FCB    = 7'h14,  // FILTER CODEBOOK (with energy)
    OP_CLRMIN = 7'h15,  // reset minimum distortion register
    OP_SETWP  = 7'h16,  // set global write pointer
    OP_SETSH  = 7'h17,  // set AAU shifter amount
    OP_SETDSH = 7'h18,  // set DAU shifter amount
    OP_LDGM   = 7'h19,  // DAU -2G register <- global RAM
    OP_LDGS   = 7'h1A,  // DAU G^2 register <- global RAM
    OP_OUTIDX = 7'h1B,  // transmit the index-save register
    OP_RPT    = 7'h1C,  // REPEAT N (N = field; 0 issues once)
    OP_RPTV   = 7'h1D,  // REPEAT N*V (N = field; 0 issues once)
    OP_EI     = 7'h1E,  // enable interrupts
    OP_DI     = 7'h1F,  // disable interrupts
    OP_RETI   = 7'h20,  // return from interrupt
    OP_JMP0   = 7'h40,  // jump; target = {op[1:0], field}
    OP_JMP1   = 7'h41,
    OP_JMP2   = 7'h42,
    OP_JMP3   = 7'h43
  } opcode_e;

  // Source of each AAU's data register (load stage).
  typedef enum logic [2:0] {
    D_HOLD  = 3'd0,
    D_LOCAL = 3'd1,  // local data RAM
    D_ROM   = 3'd2,  // codevector ROM
    D_CHAIN = 3'd3,  // previous AAU's data register (first AAU: global RAM)
    D_ACCCH = 3'd4   // previous AAU's shifted accumulator (first AAU: global RAM)
  } dsel_e;

  // Second adder input of each AAU (execute stage).
  typedef enum logic [1:0] {
    A_ZERO  = 2'd0,
    A_CHAIN = 2'd1,  // partial sum from the previous AAU
    A_DATA2 = 2'd2   // DATA2 register, aligned to the accumulator scale
  } asel_e;

  // Partial-sum input of the first AAU of the chain.
  typedef enum logic [1:0] {
    S0_ZERO    = 2'd0,
    S0_LASTACC = 2'd1,  // previous partial sum (last AAU accumulator)
    S0_GLOBAL  = 2'd2   // global word, aligned to the accumulator scale
  } s0sel_e;

  typedef enum logic [1:0] {
    DAU_NONE   = 2'd0,
    DAU_SEARCH = 2'd1,
    DAU_ENERGY = 2'd2
  } daumode_e;

  typedef enum logic [1:0] {
    GW_NONE = 2'd0,
    GW_ADDR = 2'd1,  // address field (+ loop index)
    GW_WP   = 2'd2   // write pointer, post-incremented
  } gwsel_e;

  // Read requests issued in the decode cycle.
  typedef struct packed {
    logic       lram_re;    // local data RAM
    logic       cram_re;    // local coef RAM
    logic       rom_re;     // codevector ROM
    logic       gram_re;    // global RAM
    logic       fcb_addr;   // FILTER CODEBOOK addressing (row / codevector)
  } rd_ctrl_t;

  // Load-stage controls.
  typedef struct packed {
    dsel_e      dsel;
    logic       cload;
    logic       d2load;
    logic       ldgm;
    logic       ldgs;
  } l_ctrl_t;

  // Execute-stage controls.
  typedef struct packed {
    logic       msq;        // multiplier squares the data register
    asel_e      asel;
    s0sel_e     s0sel;
    logic       acc_en;
    logic       wr_dreg_l;  // data registers -> local data RAM
    logic       wr_dreg_c;  // data registers -> local coef RAM
    daumode_e   dau;
  } e_ctrl_t;

  // Store-stage controls.
  typedef struct packed {
    logic       wr_acc_l;   // shifted accumulators -> local data RAM
    logic       wr_acc_c;   // shifted accumulators -> local coef RAM
    gwsel_e     gw;         // last AAU -> global RAM
  } s_ctrl_t;

  // Controls handled inside the control unit in the decode cycle.
  typedef struct packed {
    logic       clrmin;
    logic       setwp;
    logic       setsh;
    logic       setdsh;
    logic       outidx;
    logic       rpt;
    logic       rptv;
    logic       ei;
    logic       di;
    logic       reti;
    logic       jmp;
    logic       fcb_wp;     // FILTER CODEBOOK: take a write pointer slot on the last row
  } f_ctrl_t;

  typedef struct packed {
    rd_ctrl_t rd;
    l_ctrl_t  l;
    e_ctrl_t  e;
    s_ctrl_t  s;
    f_ctrl_t  f;
    logic     illegal;
  } ctrl_t;

  // Program word helper (testbenches and program tables).
  function automatic logic [DW-1:0] instr(opcode_e op, int unsigned field);
    return {op, field[AW-1:0]};
  endfunction

endpackage
