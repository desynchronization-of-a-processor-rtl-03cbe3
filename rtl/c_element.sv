// c_element: two-input Muller C-element with reset. The output goes high
// when both inputs are high, low when both are low, and otherwise keeps its
// value, so it waits for the later of two events. It is the usual gate for
// joining two four-phase handshakes. out = a b + out (a + b), one gate delay
// GATE_DELAY (transport). The output feeds back into its own gate; that
// combinational loop is the element's memory. rst forces the output low.
`timescale 1ns/1ps
module c_element #(
  parameter int GATE_DELAY = 1
) (
  input  logic rst,
  input  logic a,
  input  logic b,
  output logic out
);
  logic out_d;

  assign out_d = ~rst & ((a & b) | (out & (a | b)));

  always @(out_d, rst) out <= #(GATE_DELAY) out_d;
endmodule
