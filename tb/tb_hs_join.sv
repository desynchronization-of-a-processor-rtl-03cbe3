// tb_hs_join: two four-phase left channels joined into one right channel.
// The two left requests arrive after independent random delays. Checks that
// the right request rises only when both left requests are high and falls
// only when both are low, that the right acknowledge reaches both left
// channels, and that 100 handshakes complete.
`timescale 1ns/1ps
module tb_hs_join;
  logic       rst = 1'b0, rr, ra = 1'b0;
  logic [1:0] lr = 2'b00, la;
  int checks = 0, failures = 0, n = 0;

  hs_join #(.GATE_DELAY(1)) dut (.rst(rst), .lr(lr), .la(la), .rr(rr), .ra(ra));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t %s", $time, msg); end
  endtask

  always @(posedge rr) if (!rst) check(lr == 2'b11, "rr rose before both requests");
  always @(negedge rr) if (!rst) check(lr == 2'b00, "rr fell before both requests fell");

  // right environment: acknowledge after a random delay
  always @(rr) begin
    #($urandom_range(1, 6));
    ra = rr;
  end

  initial begin
    #1 rst = 1'b1; #10 rst = 1'b0;
    check(rr == 1'b0, "reset");
    for (int i = 0; i < 100; i++) begin
      fork
        begin #($urandom_range(0, 12)); lr[0] = 1'b1; end
        begin #($urandom_range(0, 12)); lr[1] = 1'b1; end
      join
      wait (la == 2'b11);
      fork
        begin #($urandom_range(0, 12)); lr[0] = 1'b0; end
        begin #($urandom_range(0, 12)); lr[1] = 1'b0; end
      join
      wait (la == 2'b00);
      n++;
    end
    check(n == 100, "handshake count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
