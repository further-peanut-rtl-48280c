// peanut_pkg: shared widths, instruction fields and encodings of the PeANUt
// accumulator machine.
//
// A PeANUt instruction is one 16-bit word: a 3-bit mode/class field
// [15:13], a 3-bit operation field [12:10] and a 10-bit operand
// specifier ("opspec") [9:0]. Memory words are 16 bits and the opspec is
// wide enough to name any of the 1024 words, so addresses are 10 bits.
//
// Encodings that follow the published programs: immediate mode 000,
// indexed mode 011, load 001, add 011, compare 111, jump 101000,
// branch-equal 101001, branch-not-equal 101010, set-XR 110001,
// increment-XR 110010, trap 110101, compare-XR 111010; trap numbers
// 1 halt, 2 get, 3 put; exceptions 5 to 8; condition codes GT, EQ, OV in
// PSW bits 12, 11, 10.
// This design's own choices: direct mode 001, store 010, sub 100,
// mul 101, div 110, branch-greater 101011, branch-less-equal 101100,
// branch-overflow 101101, load-XR 111001, store-XR 111011, and the
// overflow enable bit EN in PSW bit 9.
package peanut_pkg;

  localparam int unsigned WORD_W = 16;
  localparam int unsigned ADDR_W = 10;
  localparam int unsigned MEM_WORDS = 1 << ADDR_W;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Instruction word layout.
  typedef struct packed {
    logic [2:0] cls;     // addressing mode, or instruction class
    logic [2:0] op;      // operation within the class
    logic [9:0] opspec;  // operand specifier
  } instr_t;

  // Addressing modes of the accumulator (class 0xx) instructions.
  localparam logic [2:0] MODE_IMM   = 3'b000;
  localparam logic [2:0] MODE_DIR   = 3'b001;
  localparam logic [2:0] MODE_INDEX = 3'b011;

  // Instruction classes that are not addressing modes.
  localparam logic [2:0] CLS_BRANCH = 3'b101;
  localparam logic [2:0] CLS_XRTRAP = 3'b110;
  localparam logic [2:0] CLS_NOARG  = 3'b111;

  // Accumulator operations (field op of a mode-class instruction).
  typedef enum logic [2:0] {
    ALU_NONE  = 3'b000,   // not an instruction: illegal
    ALU_LOAD  = 3'b001,
    ALU_STORE = 3'b010,
    ALU_ADD   = 3'b011,
    ALU_SUB   = 3'b100,
    ALU_MUL   = 3'b101,
    ALU_DIV   = 3'b110,
    ALU_COMP  = 3'b111
  } alu_op_t;

  // Branch conditions (field op of a class-101 instruction).
  typedef enum logic [2:0] {
    BR_JUMP = 3'b000,
    BR_EQ   = 3'b001,
    BR_NE   = 3'b010,
    BR_GT   = 3'b011,
    BR_LE   = 3'b100,
    BR_OV   = 3'b101,
    BR_BAD6 = 3'b110,
    BR_BAD7 = 3'b111
  } br_cond_t;

  // Class 110 operations.
  localparam logic [2:0] OP_SETXR = 3'b001;
  localparam logic [2:0] OP_INCXR = 3'b010;
  localparam logic [2:0] OP_TRAP  = 3'b101;
  // Class 111 operations (no operand).
  localparam logic [2:0] OP_LDXR  = 3'b001;
  localparam logic [2:0] OP_CMPXR = 3'b010;
  localparam logic [2:0] OP_STXR  = 3'b011;

  // Decoded instruction kinds.
  typedef enum logic [3:0] {
    K_ALU,        // accumulator operation with an addressed operand
    K_BRANCH,
    K_SETXR,
    K_INCXR,
    K_LDXR,
    K_STXR,
    K_CMPXR,
    K_TRAP,
    K_ILL_INSTR,  // raises exception 5
    K_ILL_MODE    // raises exception 6
  } kind_t;

  // Trap numbers and the exceptions the machine raises itself.
  localparam logic [9:0] TRAP_HALT     = 10'd1;
  localparam logic [9:0] TRAP_GET      = 10'd2;
  localparam logic [9:0] TRAP_PUT      = 10'd3;
  localparam logic [9:0] EXC_ILL_INSTR = 10'd5;
  localparam logic [9:0] EXC_ILL_MODE  = 10'd6;
  localparam logic [9:0] EXC_OVERFLOW  = 10'd7;
  localparam logic [9:0] EXC_DIV_ZERO  = 10'd8;

  // PSW bit positions.
  localparam int unsigned PSW_GT = 12;
  localparam int unsigned PSW_EQ = 11;
  localparam int unsigned PSW_OV = 10;
  localparam int unsigned PSW_EN = 9;

  // Sign-extend a 10-bit opspec to a word.
  function automatic word_t sext_opspec(input logic [9:0] s);
    return {{(WORD_W-10){s[9]}}, s};
  endfunction

endpackage
