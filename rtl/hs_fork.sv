// hs_fork: four-phase handshake fork, one left channel to two right
// channels. The left request is sent to both branches at once; the left
// acknowledge is a C-element of the two right acknowledges, so it rises
// only when both branches have taken the data and falls only when both have
// returned to zero. This is the fork of a non-linear pipeline built outside
// the stage controllers; the C-element construction is this design's
// choice.
`timescale 1ns/1ps
module hs_fork #(
  parameter int GATE_DELAY = 1
) (
  input  logic       rst,
  input  logic       lr,
  output logic       la,
  output logic [1:0] rr,
  input  logic [1:0] ra
);
  always_comb rr = {2{lr}};

  c_element #(.GATE_DELAY(GATE_DELAY)) u_c (.rst(rst), .a(ra[0]), .b(ra[1]), .out(la));
endmodule
