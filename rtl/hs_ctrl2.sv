// hs_ctrl2: four-phase handshake controller, "asynchronous block 2".
// Same channels as hs_ctrl1 (lr/la left, rr/ra right, return-to-zero). It
// differs in when the acknowledges return to zero: la falls only after lr
// has fallen and rr has risen, and rr falls after ra has risen. A new la
// waits for ra to return to zero; the state signal csc1 remembers that the
// right-hand cycle has completed.
// The gates are the document's equations, written for the complemented
// outputs la_n = la' and rr_n = rr':
//   la'   = la' (lr' + csc1' + ra) + csc1' lr'
//   rr'   = (rr' + ra) (la' + csc1')
//   csc1  = rr' (la' + csc1)
// The fourth equation, csc0 = rr, only renames rr and needs no gate.
// Each gate has GATE_DELAY. Reset (rst high) is this design's addition: la
// low, rr = INIT_RR and csc1 at the value consistent with that state.
`timescale 1ns/1ps
module hs_ctrl2 #(
  parameter int   GATE_DELAY = 1,
  parameter logic INIT_RR    = 1'b0
) (
  input  logic rst,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra
);
  logic la_n, rr_n, csc1;

  logic la_n_d, rr_n_d, csc1_d;

  // Gate functions; each output feeds back into its own gate (the
  // state-holding complex gates of the synthesized circuit, whose
  // combinational loops are the controller's memory).
  assign la_n_d = rst | (la_n & (~lr | ~csc1 | ra)) | (~csc1 & ~lr);
  assign rr_n_d = rst ? ~INIT_RR : ((rr_n | ra) & (la_n | ~csc1));
  assign csc1_d = rst ? ~INIT_RR : (rr_n & (la_n | csc1));

  // Gate delays, as transport delays (see hs_ctrl1). Synthesis ignores them.
  always @(la_n_d, rst) la_n <= #(GATE_DELAY) la_n_d;
  always @(rr_n_d, rst) rr_n <= #(GATE_DELAY) rr_n_d;
  always @(csc1_d, rst) csc1 <= #(GATE_DELAY) csc1_d;

  assign la = ~la_n;
  assign rr = ~rr_n;
endmodule
