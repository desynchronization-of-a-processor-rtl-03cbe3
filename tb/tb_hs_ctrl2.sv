// tb_hs_ctrl2: the controller between a left environment that issues
// four-phase requests and a right environment that acknowledges them, both
// with random response times. The environments wait for the events the
// controller's state graphs order before their own, taking the stricter of
// the two controllers' graphs: lr falls after la and rr have risen, ra rises
// after rr and la have risen. Checks: the protocol rules of both channels
// (asserted on every edge), that every accepted
// request is passed on exactly once, that 200 handshakes complete on each
// side (no deadlock), the latency of la rising (one gate after the last of
// lr rising and ra falling, two gates after la and rr have both fallen,
// since the state signal sits in between) and la-rise to rr-rise (one
// gate), and that INIT_RR = 1 resets to an issued
// request.
`timescale 1ns/1ps
module tb_hs_ctrl2;
  localparam int G = 1;
  localparam int NHS = 200;
  logic rst = 1'b0, lr = 1'b0, ra = 1'b0, la, rr;
  logic lr_b = 1'b0, ra_b = 1'b0, la_b, rr_b;
  int checks = 0, failures = 0, n_left = 0, n_right = 0, outstanding = 0;
  realtime t_lr = 0, t_raf = 0, t_la = 0, t_laf = 0, t_rrf = 0;

  function automatic realtime max2(realtime a, realtime b);
    return (a > b) ? a : b;
  endfunction

  hs_ctrl2 #(.GATE_DELAY(G), .INIT_RR(1'b0)) dut (.rst(rst), .lr(lr), .la(la), .rr(rr), .ra(ra));
  hs_ctrl2 #(.GATE_DELAY(G), .INIT_RR(1'b1)) dut_b (.rst(rst), .lr(lr_b), .la(la_b), .rr(rr_b), .ra(ra_b));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t %s", $time, msg); end
  endtask

  // Protocol rules
  always @(posedge la) if (!rst) begin
    check(lr == 1'b1, "la rose without lr");
    check($realtime - max2(max2(t_lr, t_raf), max2(t_laf, t_rrf) + real'(G)) == real'(G),
          "la latency");
    t_la = $realtime;
    outstanding++;
  end
  always @(negedge la) if (!rst) check(lr == 1'b0, "la fell while lr high");
  always @(posedge rr) if (!rst) begin
    check(ra == 1'b0, "rr rose while ra high");
    check($realtime - t_la == real'(G), "la to rr latency");
    outstanding--;
    check(outstanding == 0, "request not passed on exactly once");
  end
  always @(negedge rr) if (!rst) check(ra == 1'b1, "rr fell without ra");
  always @(posedge lr) t_lr = $realtime;
  always @(negedge ra) t_raf = $realtime;
  always @(negedge la) t_laf = $realtime;
  always @(negedge rr) t_rrf = $realtime;

  initial begin
    #1; rst = 1'b1; #10;
    check(la == 1'b0 && rr == 1'b0, "reset INIT_RR=0");
    check(la_b == 1'b0 && rr_b == 1'b1, "reset INIT_RR=1");
    rst = 1'b0; #5;
    check(rr_b == 1'b1, "issued request held after reset");
    ra_b = 1'b1; #5;
    check(rr_b == 1'b0, "issued request withdrawn after ra");
    fork
      begin : left_env
        for (int i = 0; i < NHS; i++) begin
          #($urandom_range(0, 10));
          lr = 1'b1;
          wait (la && rr);
          #($urandom_range(0, 10));
          lr = 1'b0;
          wait (!la);
          n_left++;
        end
      end
      begin : right_env
        for (int i = 0; i < NHS; i++) begin
          wait (rr && la);
          #($urandom_range(0, 10));
          ra = 1'b1;
          wait (!rr);
          #($urandom_range(0, 10));
          ra = 1'b0;
          n_right++;
        end
      end
    join
    check(n_left == NHS && n_right == NHS, "handshake counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog: left %0d right %0d handshakes", n_left, n_right);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
