// regfile: 2**REGBITS registers of WIDTH bits, two combinational read ports
// and one write port clocked by wclk. Register 0 always reads as zero.
// In the desynchronized processor wclk is the MEM/WB stage's clock, so the
// write lands at the same event that advances the controller state.
`timescale 1ns/1ps
module regfile #(
  parameter int WIDTH   = 8,
  parameter int REGBITS = 3
) (
  input  logic               wclk,
  input  logic               we,
  input  logic [REGBITS-1:0] ra1,
  input  logic [REGBITS-1:0] ra2,
  input  logic [REGBITS-1:0] wa,
  input  logic [WIDTH-1:0]   wd,
  output logic [WIDTH-1:0]   rd1,
  output logic [WIDTH-1:0]   rd2
);
  logic [WIDTH-1:0] mem [2**REGBITS];

  always_ff @(posedge wclk)
    if (we && wa != '0) mem[wa] <= wd;

  assign rd1 = (ra1 == '0) ? '0 : mem[ra1];
  assign rd2 = (ra2 == '0) ? '0 : mem[ra2];
endmodule
