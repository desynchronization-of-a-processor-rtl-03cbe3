// matched_delay: behavioural model of a selectable matched delay line.
// Models the delay element placed between two handshake controllers: it
// must be at least as slow as the critical path of the logic between the
// register groups the two controllers clock, so that a request never
// overtakes its data. The line is a chain of TAPS buffers of UNIT_DELAY
// each; sel picks the output after sel+1 buffers, so the delay is
// (sel + 1) * UNIT_DELAY for both edges. The selectable delay mirrors the
// delay-selection pins of the fabricated chip; the number of taps and the
// per-tap delay are this design's choice. In silicon this is a chain of
// gates sized against the logic it matches; here the delays are modelled
// with transport delays and the buffer chain itself has no logic function,
// so synthesis keeps only the tap multiplexer. rst has no logic function:
// an edge of it makes every tap copy its predecessor, so that a line whose
// input has not changed since the start of simulation still settles.
`timescale 1ns/1ps
module matched_delay #(
  parameter int TAPS       = 8,
  parameter int UNIT_DELAY = 2,
  localparam int SELW      = $clog2(TAPS)
) (
  input  logic            rst,
  input  logic            in,
  input  logic [SELW-1:0] sel,
  output logic            out
);
  logic [TAPS:0] tap;

  assign tap[0] = in;
  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    always @(tap[i], rst) tap[i+1] <= #(UNIT_DELAY) tap[i];   // transport delay
  end

  assign out = tap[int'(sel) + 1];
endmodule
