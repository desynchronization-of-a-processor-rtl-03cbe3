// alucontrol: turns the controller's ALU request and the instruction's
// function field into the ALU operation. Requests ALUOP_ADD and ALUOP_SUB are
// passed on directly (address and PC arithmetic, beq compare); ALUOP_FUNCT
// decodes funct for R-type instructions. Combinational. The document keeps
// this as a block of its own next to controller and datapath; its contents
// are this design's choice.
`timescale 1ns/1ps
module alucontrol
  import mips_pkg::*;
(
  input  aluop_t      aluop,
  input  logic [5:0]  funct,
  output aluctl_t     alucont
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: alucont = ALU_ADD;
      ALUOP_SUB: alucont = ALU_SUB;
      default: begin
        unique case (funct)
          FN_ADD:  alucont = ALU_ADD;
          FN_SUB:  alucont = ALU_SUB;
          FN_AND:  alucont = ALU_AND;
          FN_OR:   alucont = ALU_OR;
          FN_SLT:  alucont = ALU_SLT;
          default: alucont = ALU_ADD;
        endcase
      end
    endcase
  end
endmodule
