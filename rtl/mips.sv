// mips: the 8-bit multicycle MIPS processor, built from the three parts the
// design is divided into: controller, alucontrol and datapath.
// Interface: a byte-wide memory port (adr, memdata in, writedata out,
// memread, memwrite). Clocking: clk_ir[3:0] load the four instruction-byte
// registers and clk_wb loads everything else, including the controller
// state; memory writes are expected on the rising edge of clk_wb while
// memwrite is high. Tie all five clocks to one clock for synchronous use.
// state and pcsource are brought out as test outputs, as on the chip.
`timescale 1ns/1ps
module mips
  import mips_pkg::*;
#(
  parameter int WIDTH   = 8,
  parameter int REGBITS = 3
) (
  input  logic [3:0]       clk_ir,
  input  logic             clk_wb,
  input  logic             rst,
  input  logic [WIDTH-1:0] memdata,
  output logic             memread,
  output logic             memwrite,
  output logic [WIDTH-1:0] adr,
  output logic [WIDTH-1:0] writedata,
  output state_t           state,
  output pcsrc_t           pcsource
);
  ctrl_t   ctrl;
  aluctl_t alucont;
  opcode_t op;
  logic    zero;
  logic [5:0] funct;

  controller u_ctrl (
    .clk(clk_wb), .rst(rst), .op(op), .zero(zero), .ctrl(ctrl), .state(state)
  );

  alucontrol u_aluctl (.aluop(ctrl.aluop), .funct(funct), .alucont(alucont));

  datapath #(.WIDTH(WIDTH), .REGBITS(REGBITS)) u_dp (
    .clk_ir(clk_ir), .clk_wb(clk_wb), .rst(rst), .memdata(memdata),
    .ctrl(ctrl), .alucont(alucont), .zero(zero), .op(op), .funct(funct),
    .adr(adr), .writedata(writedata)
  );

  assign memread  = ctrl.memread;
  assign memwrite = ctrl.memwrite;
  assign pcsource = ctrl.pcsource;
endmodule
