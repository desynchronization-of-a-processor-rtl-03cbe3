// alu: WIDTH-bit arithmetic-logic unit of the MIPS execute stage.
// Bit 2 of the operation inverts b and sets the carry-in, so one adder does
// both add and subtract; bits 1:0 select and, or, sum or set-less-than.
// Set-less-than is a signed comparison: the sign of a - b, or the sign of a
// when the operands' signs differ (where the difference can overflow). 'zero' is high when the result is zero and drives
// the branch decision. Purely combinational. The document names the stage
// (EX) only; the operation set follows the instructions this design supports.
`timescale 1ns/1ps
module alu
  import mips_pkg::*;
#(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  aluctl_t          op,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  logic [WIDTH-1:0] b2, sum;
  logic             less;

  always_comb begin
    b2  = op[2] ? ~b : b;
    sum = a + b2 + {{(WIDTH-1){1'b0}}, op[2]};
    less = (a[WIDTH-1] != b[WIDTH-1]) ? a[WIDTH-1] : sum[WIDTH-1];
    unique case (op[1:0])
      2'b00:   result = a & b;
      2'b01:   result = a | b;
      2'b10:   result = sum;
      default: result = {{(WIDTH-1){1'b0}}, less};
    endcase
  end

  assign zero = (result == '0);
endmodule
