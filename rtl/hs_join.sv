// hs_join: four-phase handshake join, two left channels to one right
// channel. The right request is a C-element of the two left requests, so
// it rises when both branches have delivered and falls when both have
// withdrawn; the right acknowledge is returned to both branches. This is
// the join of a non-linear pipeline built outside the stage controllers;
// the C-element construction is this design's choice.
`timescale 1ns/1ps
module hs_join #(
  parameter int GATE_DELAY = 1
) (
  input  logic       rst,
  input  logic [1:0] lr,
  output logic [1:0] la,
  output logic       rr,
  input  logic       ra
);
  c_element #(.GATE_DELAY(GATE_DELAY)) u_c (.rst(rst), .a(lr[0]), .b(lr[1]), .out(rr));

  assign la = {2{ra}};
endmodule
