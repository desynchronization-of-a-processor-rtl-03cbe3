// controller: multicycle control state machine of the 8-bit MIPS.
// Every instruction starts with four fetch cycles, one per instruction byte,
// with memread high and one bit of irwrite set; the PC is advanced by one
// byte in each. DECODE computes the branch target; the remaining states
// execute lb (MEMADR, LBRD, LBWR), sb (MEMADR, SBWR), R-type (RTYPEEX,
// RTYPEWR), beq (BEQEX), j (JEX) and addi (ADDIEX, ADDIWR).
// Timing: the state register advances on the rising edge of clk, which in
// the desynchronized processor is the MEM/WB stage clock; rst is
// asynchronous and returns the machine to FETCH1. Outputs are Moore except
// pcen, which in BEQEX follows the ALU's zero flag.
// The four-cycle fetch with memread held high, then memread low except for
// the load's data read, follows the document; the state list and the control
// word encoding are this design's own.
`timescale 1ns/1ps
module controller
  import mips_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  opcode_t op,
  input  logic    zero,
  output ctrl_t   ctrl,
  output state_t  state
);
  state_t nextstate;

  always_ff @(posedge clk or posedge rst)
    if (rst) state <= S_FETCH1;
    else     state <= nextstate;

  always_comb begin
    unique case (state)
      S_FETCH1:  nextstate = S_FETCH2;
      S_FETCH2:  nextstate = S_FETCH3;
      S_FETCH3:  nextstate = S_FETCH4;
      S_FETCH4:  nextstate = S_DECODE;
      S_DECODE: begin
        unique case (op)
          OP_LB, OP_SB: nextstate = S_MEMADR;
          OP_RTYPE:     nextstate = S_RTYPEEX;
          OP_BEQ:       nextstate = S_BEQEX;
          OP_J:         nextstate = S_JEX;
          OP_ADDI:      nextstate = S_ADDIEX;
          default:      nextstate = S_FETCH1;  // unknown opcode: skip it
        endcase
      end
      S_MEMADR:  nextstate = (op == OP_LB) ? S_LBRD : S_SBWR;
      S_LBRD:    nextstate = S_LBWR;
      S_RTYPEEX: nextstate = S_RTYPEWR;
      S_ADDIEX:  nextstate = S_ADDIWR;
      default:   nextstate = S_FETCH1;
    endcase
  end

  always_comb begin
    ctrl = '0;
    ctrl.pcsource = PCSRC_ALU;
    ctrl.aluop    = ALUOP_ADD;
    unique case (state)
      S_FETCH1, S_FETCH2, S_FETCH3, S_FETCH4: begin
        ctrl.memread = 1'b1;
        ctrl.irwrite = 4'b0001 << (state - S_FETCH1);
        ctrl.alusrcb = 2'b01;
        ctrl.pcen    = 1'b1;
      end
      S_DECODE:  ctrl.alusrcb = 2'b11;
      S_MEMADR: begin
        ctrl.alusrca = 1'b1;
        ctrl.alusrcb = 2'b10;
      end
      S_LBRD: begin
        ctrl.memread = 1'b1;
        ctrl.iord    = 1'b1;
      end
      S_LBWR: begin
        ctrl.regwrite = 1'b1;
        ctrl.memtoreg = 1'b1;
      end
      S_SBWR: begin
        ctrl.memwrite = 1'b1;
        ctrl.iord     = 1'b1;
      end
      S_RTYPEEX: begin
        ctrl.alusrca = 1'b1;
        ctrl.aluop   = ALUOP_FUNCT;
      end
      S_RTYPEWR: begin
        ctrl.regdst   = 1'b1;
        ctrl.regwrite = 1'b1;
      end
      S_BEQEX: begin
        ctrl.alusrca  = 1'b1;
        ctrl.aluop    = ALUOP_SUB;
        ctrl.pcsource = PCSRC_ALUOUT;
        ctrl.pcen     = zero;
      end
      S_JEX: begin
        ctrl.pcsource = PCSRC_JUMP;
        ctrl.pcen     = 1'b1;
      end
      S_ADDIEX: begin
        ctrl.alusrca = 1'b1;
        ctrl.alusrcb = 2'b10;
      end
      S_ADDIWR:  ctrl.regwrite = 1'b1;
      default: ;
    endcase
  end
endmodule
