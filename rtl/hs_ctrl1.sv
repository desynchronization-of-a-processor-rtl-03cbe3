// hs_ctrl1: four-phase handshake controller, "asynchronous block 1".
// Left channel lr/la, right channel rr/ra, single-rail bundled data with
// return-to-zero signalling. A request on lr is acknowledged on la and, at
// the same time, passed on as rr; la returns to zero after lr does, and rr
// after ra is raised. A new la/rr cycle waits until ra has returned to zero,
// which the internal state signal csc0 enforces (csc0_n below is its
// complement, high only while both la and rr are low).
// The three complex gates are the document's equations:
//   la     = lr (ra' csc0' + la)
//   rr     = ra' rr + la csc0'
//   csc0'  = rr' la'
// Each gate has GATE_DELAY; the circuit relies on the rr gate being no
// slower than the csc0' gate (rr must latch before csc0' falls after la
// rises), which equal gate delays satisfy. The rising edge of rr is used as
// the clock of the register group this controller drives.
// Reset (rst high) is this design's addition: la is forced low and rr to
// INIT_RR, so that a ring of controllers can start with one request already
// issued. Not synthesizable as an ordinary synchronous block: it is a
// speed-dependent asynchronous circuit whose delays matter.
`timescale 1ns/1ps
module hs_ctrl1 #(
  parameter int   GATE_DELAY = 1,
  parameter logic INIT_RR    = 1'b0
) (
  input  logic rst,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra
);
  logic csc0_n;

  logic la_d, rr_d, csc0_n_d;

  // Gate functions. la and rr feed back into their own gates: these are the
  // state-holding complex gates of the synthesized circuit, and the
  // combinational loops they form are the controller's memory.
  assign la_d     = ~rst & lr & ((~ra & csc0_n) | la);
  assign rr_d     = rst ? INIT_RR : ((~ra & rr) | (la & csc0_n));
  assign csc0_n_d = ~rr & ~la;

  // Gate delays. A non-blocking assignment with an intra-assignment delay is
  // a transport delay: every input change reaches the output in order, so no
  // edge is lost when inputs change again within GATE_DELAY. rst is in each
  // list so that an edge of rst always re-evaluates every gate, whatever
  // values the simulation started from. Synthesis ignores the delays.
  always @(la_d, rst)     la     <= #(GATE_DELAY) la_d;
  always @(rr_d, rst)     rr     <= #(GATE_DELAY) rr_d;
  always @(csc0_n_d, rst) csc0_n <= #(GATE_DELAY) csc0_n_d;
endmodule
