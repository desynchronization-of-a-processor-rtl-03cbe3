// desync_mips: the 8-bit multicycle MIPS with a selectable clocking scheme.
// The processor's registers are split into five groups, each with its own
// clock: the four instruction-byte registers (bits 7:0, 15:8, 23:16 and
// 31:24) and the write-back group (controller state, PC, memory data,
// operand and ALU-result registers, register file). A multiplexer per group
// chooses between the global clock clk (desync = 0, synchronous mode) and
// the group's output of the handshake ring (desync = 1, desynchronized
// mode), whose matched delays are set by dsel. async_out brings the five
// ring outputs out as test pins; state and pcsource are test pins as well.
// Memory: combinational read of memdata at adr; a write of writedata must
// happen on the rising edge of memclk while memwrite is high. memclk is the
// write-back group's clock, so in both modes a store lands at the same
// event that advances the controller.
// Timing: in synchronous mode every register loads on the rising edge of
// clk. In desynchronized mode one trip of the token round the ring pulses
// the instruction-byte clocks in order and then the write-back clock; that
// trip is one machine cycle. The ring is held in reset while rst is high or
// desync is low; switch modes only with rst high.
// Beside the processor, and independent of it, the top holds the fork-join
// pipeline (fj_* ports): a desynchronized pipeline that splits into two
// branches and merges again, reset by rst.
// Following the document: the five ring outputs, four of which clock the
// instruction-byte registers and the fifth the MEM/WB group and the state;
// the clock/async multiplexer per group; the mode pin; delay-select pins
// and the test pins. This design's own: which registers share the fifth
// clock, the width of dsel, and the reset scheme.
`timescale 1ns/1ps
module desync_mips
  import mips_pkg::*;
#(
  parameter int WIDTH      = 8,
  parameter int REGBITS    = 3,
  parameter int CTRL_TYPE  = 1,
  parameter int GATE_DELAY = 1,
  parameter int TAPS       = 8,
  parameter int UNIT_DELAY = 2,
  localparam int NSTAGE    = 5,
  localparam int SELW      = $clog2(TAPS)
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          desync,
  input  logic [NSTAGE-1:0][SELW-1:0]   dsel,
  input  logic [WIDTH-1:0]              memdata,
  output logic                          memread,
  output logic                          memwrite,
  output logic [WIDTH-1:0]              adr,
  output logic [WIDTH-1:0]              writedata,
  output logic                          memclk,
  output state_t                        state,
  output pcsrc_t                        pcsource,
  output logic [NSTAGE-1:0]             async_out,
  // Fork-join pipeline, a separate desynchronized structure (see fj_pipeline)
  input  logic [SELW-1:0]               fj_dsel,
  input  logic                          fj_in_req,
  output logic                          fj_in_ack,
  input  logic [WIDTH-1:0]              fj_in_data,
  output logic                          fj_out_req,
  input  logic                          fj_out_ack,
  output logic [WIDTH-1:0]              fj_out_data
);
  logic [NSTAGE-1:0] stage_clk;
  logic              ring_rst;

  assign ring_rst = rst | ~desync;

  desync_ring #(
    .N(NSTAGE), .CTRL_TYPE(CTRL_TYPE), .GATE_DELAY(GATE_DELAY),
    .TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)
  ) u_ring (
    .rst(ring_rst), .dsel(dsel), .async_out(async_out)
  );

  clock_select #(.N(NSTAGE)) u_csel (
    .clk(clk), .desync(desync), .async_in(async_out), .stage_clk(stage_clk)
  );

  mips #(.WIDTH(WIDTH), .REGBITS(REGBITS)) u_mips (
    .clk_ir(stage_clk[3:0]), .clk_wb(stage_clk[4]), .rst(rst),
    .memdata(memdata), .memread(memread), .memwrite(memwrite), .adr(adr),
    .writedata(writedata), .state(state), .pcsource(pcsource)
  );

  assign memclk = stage_clk[4];

  fj_pipeline #(
    .WIDTH(WIDTH), .GATE_DELAY(GATE_DELAY), .TAPS(TAPS), .UNIT_DELAY(UNIT_DELAY)
  ) u_fj (
    .rst(rst), .dsel(fj_dsel), .in_req(fj_in_req), .in_ack(fj_in_ack),
    .in_data(fj_in_data), .out_req(fj_out_req), .out_ack(fj_out_ack),
    .out_data(fj_out_data)
  );
endmodule
