// mips_pkg: types and constants shared by the multicycle MIPS datapath.
//
// Holds the word type, the opcodes and funct codes of the supported
// instruction subset (add, sub, and, or, slt, lw, sw, beq, j), the 2-bit ALU
// operation and ALUOp encodings, the 3-bit execution stage encoding used by
// the main control, and the memory map of the unified instruction/data
// memory. All encodings follow the MIPS instruction set; the stage numbering
// (000 boot, 001..101 for the five execution steps) and the boot address
// 0x00400000 follow the design's own description, as do the preloaded demo
// program (an absolute-difference routine) and its two input words.
package mips_pkg;

  typedef logic [31:0] word_t;

  // Primary opcode field, instruction bits [31:26].
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_BEQ   = 6'b000100,
    OP_LW    = 6'b100011,
    OP_SW    = 6'b101011
  } opcode_e;

  // funct field, instruction bits [5:0], of the R-type instructions.
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // Operation select of the word ALU.
  typedef enum logic [1:0] {
    ALU_AND  = 2'b00,
    ALU_OR   = 2'b01,
    ALU_ADD  = 2'b10,
    ALU_LESS = 2'b11
  } aluop_sel_e;

  // ALUOp from the main control to the ALU control.
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,   // address arithmetic, PC increment
    ALUOP_SUB   = 2'b01,   // beq compare
    ALUOP_FUNCT = 2'b10    // R-type: decode funct
  } aluop_e;

  // Execution stage held in the stage register.
  typedef enum logic [2:0] {
    ST_BOOT   = 3'b000,
    ST_FETCH  = 3'b001,
    ST_DECODE = 3'b010,
    ST_EXEC   = 3'b011,
    ST_MEM    = 3'b100,
    ST_WB     = 3'b101
  } stage_e;

  // Memory map: bits [31:10] select a segment, bits [9:2] the word.
  localparam logic [21:0] SEG_DATA = 22'h04_0000;  // 0x10000000 >> 10
  localparam logic [21:0] SEG_PROG = 22'h00_1000;  // 0x00400000 >> 10

  localparam word_t BOOT_ADDR = 32'h0040_0000;
  localparam word_t DATA_BASE = 32'h1000_0000;

  // Demo program preloaded in the program segment at start-up: computes
  // |mem[0x10000000] - mem[0x10000004]|, stores it at 0x10000008 and reads
  // it back into $t0.
  localparam int PROG_WORDS = 9;
  localparam word_t DEMO_PROGRAM [PROG_WORDS] = '{
    32'h8e08_0000,   // 0x00400000  lw   $t0, 0($s0)
    32'h8e09_0004,   // 0x00400004  lw   $t1, 4($s0)
    32'h0109_502a,   // 0x00400008  slt  $t2, $t0, $t1
    32'h1140_0003,   // 0x0040000C  beq  $t2, $zero, +3
    32'h0128_5822,   // 0x00400010  sub  $t3, $t1, $t0
    32'h0810_0007,   // 0x00400014  j    0x0040001C
    32'h0109_5822,   // 0x00400018  sub  $t3, $t0, $t1
    32'hae0b_0008,   // 0x0040001C  sw   $t3, 8($s0)
    32'h8e08_0008    // 0x00400020  lw   $t0, 8($s0)
  };

endpackage
