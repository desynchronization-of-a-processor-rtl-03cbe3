// clock_select: per-stage clock multiplexers. For each of N register groups
// the group's clock is the global clock clk when desync is low
// (synchronous mode) and the group's own handshake-controller output
// async_in[k] when desync is high (desynchronized mode). One select pin
// switches the whole processor between the two modes, as on the chip.
// Combinational; the mode is meant to be changed only while both sources
// are idle (the handshake ring held in reset and clk low).
`timescale 1ns/1ps
module clock_select #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         desync,
  input  logic [N-1:0] async_in,
  output logic [N-1:0] stage_clk
);
  always_comb
    for (int k = 0; k < N; k++)
      stage_clk[k] = desync ? async_in[k] : clk;
endmodule
