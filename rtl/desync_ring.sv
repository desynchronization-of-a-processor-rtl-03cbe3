// desync_ring: the handshake network that replaces the clock tree.
// N handshake controllers form a ring, one per register group (in the
// processor: Fetch & Memdata, Regfile, ID/EX, EX/MEM, MEM/WB). Controller k
// takes its left request from controller k-1's right request through a
// matched delay chosen by dsel[k], and its right acknowledge from
// controller k+1's left acknowledge. The rising edge of controller k's rr
// is stage clock async_out[k].
// On reset the last controller holds an issued request (INIT_RR = 1), so
// once rst falls a single token circulates: async_out[0], [1], ..., [N-1],
// then [0] again. One trip round the ring replaces one clock period. If any
// controller or delay fails the ring stops, which is the self-checking
// property of the desynchronized circuit.
// CTRL_TYPE selects asynchronous block 1 (hs_ctrl1, the default, the one the
// document prefers) or block 2 (hs_ctrl2). The ring topology, the reset
// token and the use of rr as the stage clock are this design's choice.
`timescale 1ns/1ps
module desync_ring #(
  parameter int N          = 5,
  parameter int CTRL_TYPE  = 1,
  parameter int GATE_DELAY = 1,
  parameter int TAPS       = 8,
  parameter int UNIT_DELAY = 2,
  localparam int SELW      = $clog2(TAPS)
) (
  input  logic                rst,
  input  logic [N-1:0][SELW-1:0] dsel,
  output logic [N-1:0]        async_out
);
  logic [N-1:0] lr, la, rr, ra;

  for (genvar k = 0; k < N; k++) begin : g_stage
    localparam int PREV = (k + N - 1) % N;
    localparam int NEXT = (k + 1) % N;
    localparam logic INIT = (k == N - 1);

    matched_delay #(.TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)) u_dly (
      .rst(rst), .in(rr[PREV]), .sel(dsel[k]), .out(lr[k])
    );

    assign ra[k] = la[NEXT];

    if (CTRL_TYPE == 2) begin : g_c2
      hs_ctrl2 #(.GATE_DELAY(GATE_DELAY), .INIT_RR(INIT)) u_ctrl (
        .rst(rst), .lr(lr[k]), .la(la[k]), .rr(rr[k]), .ra(ra[k])
      );
    end else begin : g_c1
      hs_ctrl1 #(.GATE_DELAY(GATE_DELAY), .INIT_RR(INIT)) u_ctrl (
        .rst(rst), .lr(lr[k]), .la(la[k]), .rr(rr[k]), .ra(ra[k])
      );
    end
  end

  assign async_out = rr;
endmodule
