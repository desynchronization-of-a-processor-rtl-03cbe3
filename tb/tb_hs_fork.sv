// tb_hs_fork: one four-phase left channel forked to two right channels
// whose acknowledges come back after independent random delays. Checks that
// both right requests follow the left request, that the left acknowledge
// rises only after both right acknowledges have risen and falls only after
// both have fallen, and that 100 handshakes complete.
`timescale 1ns/1ps
module tb_hs_fork;
  logic       rst = 1'b0, lr = 1'b0, la;
  logic [1:0] rr, ra = 2'b00;
  int checks = 0, failures = 0, n = 0;

  hs_fork #(.GATE_DELAY(1)) dut (.rst(rst), .lr(lr), .la(la), .rr(rr), .ra(ra));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t %s", $time, msg); end
  endtask

  always @(posedge la) if (!rst) check(ra == 2'b11, "la rose before both acknowledges");
  always @(negedge la) if (!rst) check(ra == 2'b00, "la fell before both acknowledges fell");

  // right environments: acknowledge each request edge after a random delay
  for (genvar i = 0; i < 2; i++) begin : g_env
    int edges = 0;
    initial forever begin
      wait (rr[i] == 1'b1);
      check(lr == 1'b1, "right request rose without left request");
      edges++;
      #($urandom_range(1, 12));
      ra[i] = 1'b1;
      wait (rr[i] == 1'b0);
      check(lr == 1'b0, "right request fell while left request high");
      edges++;
      #($urandom_range(1, 12));
      ra[i] = 1'b0;
    end
  end

  initial begin
    #1 rst = 1'b1; #10 rst = 1'b0;
    check(la == 1'b0, "reset");
    for (int i = 0; i < 100; i++) begin
      #($urandom_range(0, 5));
      lr = 1'b1;
      wait (la);
      #($urandom_range(0, 5));
      lr = 1'b0;
      wait (!la);
      n++;
    end
    check(n == 100, "handshake count");
    check(g_env[0].edges == 200 && g_env[1].edges == 200, "right request edge counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
