// mips_pkg: types and constants shared by the 8-bit multicycle MIPS.
// The instruction subset (lb, sb, R-type add/sub/and/or/slt, beq, j, addi) and
// its MIPS-I encodings are this design's choice of the classic 8-bit teaching
// MIPS; the document only names load and arithmetic instructions. The state
// encoding is likewise this design's own: the document says only that an
// instruction takes a four-cycle fetch followed by a few execution cycles.
`timescale 1ns/1ps
package mips_pkg;

  // Opcode field, instruction bits 31:26
  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_BEQ   = 6'b000100,
    OP_ADDI  = 6'b001000,
    OP_LB    = 6'b100000,
    OP_SB    = 6'b101000
  } opcode_t;

  // Function field of R-type instructions, bits 5:0
  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // Operation requested by the controller from alucontrol
  typedef enum logic [1:0] {
    ALUOP_ADD   = 2'b00,
    ALUOP_SUB   = 2'b01,
    ALUOP_FUNCT = 2'b10
  } aluop_t;

  // ALU operation: bit 2 inverts operand b and adds one, bits 1:0 pick the result
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } aluctl_t;

  // Controller states: four fetch cycles, decode, then per-instruction cycles
  typedef enum logic [3:0] {
    S_FETCH1  = 4'd0,
    S_FETCH2  = 4'd1,
    S_FETCH3  = 4'd2,
    S_FETCH4  = 4'd3,
    S_DECODE  = 4'd4,
    S_MEMADR  = 4'd5,
    S_LBRD    = 4'd6,
    S_LBWR    = 4'd7,
    S_SBWR    = 4'd8,
    S_RTYPEEX = 4'd9,
    S_RTYPEWR = 4'd10,
    S_BEQEX   = 4'd11,
    S_JEX     = 4'd12,
    S_ADDIEX  = 4'd13,
    S_ADDIWR  = 4'd14
  } state_t;

  // PC source select
  typedef enum logic [1:0] {
    PCSRC_ALU    = 2'b00,  // ALU result (pc + 1)
    PCSRC_ALUOUT = 2'b01,  // registered ALU result (branch target)
    PCSRC_JUMP   = 2'b10   // jump target from the instruction
  } pcsrc_t;

  // Control word from the controller to the datapath
  typedef struct packed {
    logic       memread;
    logic       memwrite;
    logic       alusrca;    // 0: pc, 1: register A
    logic [1:0] alusrcb;    // 00: B, 01: 1, 10: imm, 11: imm << 2
    logic       memtoreg;
    logic       iord;       // 0: address from pc, 1: from ALUOut
    logic       pcen;
    logic       regwrite;
    logic       regdst;     // 0: rt, 1: rd
    pcsrc_t     pcsource;
    logic [3:0] irwrite;    // one enable per instruction-register byte
    aluop_t     aluop;
  } ctrl_t;

endpackage
