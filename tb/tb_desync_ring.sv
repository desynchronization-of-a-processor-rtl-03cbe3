// tb_desync_ring: rings of five controllers of each type (block 1 and
// block 2). After reset each must pulse its outputs in order 0,1,2,3,4
// round after round; one round must take longer when the delay selects are
// raised, and by the expected amount (five times the added delay), the
// delay selects being changed only under reset. The
// pulse of each output must be at least as long as the delay in front of
// the next stage (each pulse and each ordering is a check of its own),
// and a ring whose request path is cut must stop.
`timescale 1ns/1ps
module tb_desync_ring;
  localparam int N = 5, G = 1, UNIT = 2;
  logic rst = 1'b0, run = 1'b0;
  logic [N-1:0][2:0] dsel;
  logic [N-1:0] out1, out2;
  int checks = 0, failures = 0;
  int exp1 = 0, exp2 = 0, bad1 = 0, bad2 = 0, rounds1 = 0, rounds2 = 0;
  realtime t_round1 [$], t_rise [N], t_fall [N];
  int short_pulse = 0;

  desync_ring #(.N(N), .CTRL_TYPE(1), .GATE_DELAY(G), .TAPS(8), .UNIT_DELAY(UNIT)) dut1 (
    .rst(rst), .dsel(dsel), .async_out(out1));
  desync_ring #(.N(N), .CTRL_TYPE(2), .GATE_DELAY(G), .TAPS(8), .UNIT_DELAY(UNIT)) dut2 (
    .rst(rst), .dsel(dsel), .async_out(out2));

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge out1[k]) if (run) begin
      checks++;
      if (k != exp1) begin bad1++; failures++; $display("FAIL ring 1 pulse %0d, expected %0d", k, exp1); end
      exp1 = (k + 1) % N;
      t_rise[k] = $realtime;
      if (k == 0) begin rounds1++; t_round1.push_back($realtime); end
    end
    always @(negedge out1[k]) if (run) begin
      checks++;
      if ($realtime - t_rise[k] < real'((int'(dsel[(k + 1) % N]) + 1) * UNIT)) begin
        short_pulse++; failures++; $display("FAIL short pulse on output %0d", k);
      end
    end
    always @(posedge out2[k]) if (run) begin
      checks++;
      if (k != exp2) begin bad2++; failures++; $display("FAIL ring 2 pulse %0d, expected %0d", k, exp2); end
      exp2 = (k + 1) % N;
      if (k == 0) rounds2++;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic realtime round_time();
    int n = t_round1.size();
    return (t_round1[n-1] - t_round1[n-11]) / 10.0;
  endfunction

  initial begin
    realtime r_short, r_long;
    int r1, r2;
    for (int k = 0; k < N; k++) dsel[k] = 3'd0;
    #1 rst = 1'b1; #100 rst = 1'b0; run = 1'b1;
    #2000;
    check(bad1 == 0 && bad2 == 0, $sformatf("ring order errors %0d %0d", bad1, bad2));
    check(rounds1 > 20 && rounds2 > 20, $sformatf("rounds %0d %0d", rounds1, rounds2));
    r_short = round_time();
    check(r_short == real'(N * (UNIT + 2 * G)),
          $sformatf("round time %0.1f at dsel 0, expected %0d", r_short, N * (UNIT + 2 * G)));
    // delay selects change only while the ring is held in reset
    run = 1'b0; rst = 1'b1; exp1 = 0; exp2 = 0;
    for (int k = 0; k < N; k++) dsel[k] = 3'd4;
    #100 rst = 1'b0; run = 1'b1;
    #3000;
    r_long = round_time();
    $display("round time %0.1f ns at dsel 0, %0.1f ns at dsel 4", r_short, r_long);
    check(r_long - r_short == real'(N * 4 * UNIT),
          $sformatf("round time grew by %0.1f, expected %0d", r_long - r_short, N * 4 * UNIT));
    check(short_pulse == 0, "a pulse was shorter than the next matched delay");
    check(bad1 == 0 && bad2 == 0, "ring order after delay change");
    // cut a request path: both rings must stop
    force dut1.lr[3] = 1'b0;
    force dut2.lr[3] = 1'b0;
    #200;
    r1 = rounds1; r2 = rounds2;
    #1000;
    check(rounds1 == r1 && rounds2 == r2, "ring kept running with a cut request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
