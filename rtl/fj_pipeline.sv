// fj_pipeline: a desynchronized non-linear pipeline: one input stage, a
// fork into two branches of two stages each, a join, and one output stage.
// Every stage is a register of WIDTH bits clocked by the rising edge of its
// own hs_ctrl1 controller's rr, with a matched delay (set by dsel) in front
// of each controller's left request. Branch 0 adds 1 to the word at each of
// its stages and branch 1 passes it unchanged; the output stage stores the
// sum of the two branch results, so each token x leaves as 2x + 2. The
// arithmetic only makes the data flow observable.
// Interface: four-phase bundled data. Drive in_data and raise in_req; the
// stage acknowledges on in_ack. out_req rises with out_data valid; answer
// with out_ack.
// The fork-and-join shape follows the document's figure of a non-linear
// pipeline; the stage counts per branch are read from that figure, and the
// data operations, widths and delays are this design's choice.
`timescale 1ns/1ps
module fj_pipeline #(
  parameter int WIDTH      = 8,
  parameter int GATE_DELAY = 1,
  parameter int TAPS       = 8,
  parameter int UNIT_DELAY = 2,
  localparam int SELW      = $clog2(TAPS)
) (
  input  logic             rst,
  input  logic [SELW-1:0]  dsel,
  input  logic             in_req,
  output logic             in_ack,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_req,
  input  logic             out_ack,
  output logic [WIDTH-1:0] out_data
);
  // Stage controllers: 0 input, 1-2 branch 0, 3-4 branch 1, 5 output
  logic [5:0] lr, la, rr, ra;
  logic [WIDTH-1:0] q0, q1, q2, q3, q4, q5;
  logic [1:0] f_rr, f_ra, j_lr, j_la;
  logic       j_rr;

  for (genvar s = 0; s < 6; s++) begin : g_ctrl
    hs_ctrl1 #(.GATE_DELAY(GATE_DELAY), .INIT_RR(1'b0)) u_ctrl (
      .rst(rst), .lr(lr[s]), .la(la[s]), .rr(rr[s]), .ra(ra[s])
    );
  end

  // Left requests, each through a matched delay
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d0 (.rst(rst), .in(in_req),  .sel(dsel), .out(lr[0]));
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d1 (.rst(rst), .in(f_rr[0]), .sel(dsel), .out(lr[1]));
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d2 (.rst(rst), .in(rr[1]),   .sel(dsel), .out(lr[2]));
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d3 (.rst(rst), .in(f_rr[1]), .sel(dsel), .out(lr[3]));
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d4 (.rst(rst), .in(rr[3]),   .sel(dsel), .out(lr[4]));
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d5 (.rst(rst), .in(j_rr),    .sel(dsel), .out(lr[5]));

  assign in_ack = la[0];

  hs_fork #(.GATE_DELAY(GATE_DELAY)) u_fork (
    .rst(rst), .lr(rr[0]), .la(ra[0]), .rr(f_rr), .ra(f_ra)
  );
  assign f_ra = {la[3], la[1]};

  assign ra[1] = la[2];
  assign ra[3] = la[4];

  assign j_lr = {rr[4], rr[2]};
  assign {ra[4], ra[2]} = j_la;
  hs_join #(.GATE_DELAY(GATE_DELAY)) u_join (
    .rst(rst), .lr(j_lr), .la(j_la), .rr(j_rr), .ra(la[5])
  );

  // The output request is delayed too, so that out_data (loaded on the
  // rising edge of rr[5]) is stable before out_req rises.
  matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_d6 (.rst(rst), .in(rr[5]),   .sel(dsel), .out(out_req));
  assign ra[5]   = out_ack;

  // Stage registers, each on its controller's rr
  always_ff @(posedge rr[0]) q0 <= in_data;
  always_ff @(posedge rr[1]) q1 <= q0 + WIDTH'(1);
  always_ff @(posedge rr[2]) q2 <= q1 + WIDTH'(1);
  always_ff @(posedge rr[3]) q3 <= q0;
  always_ff @(posedge rr[4]) q4 <= q3;
  always_ff @(posedge rr[5]) q5 <= q2 + q4;

  assign out_data = q5;
endmodule
