// tb_matched_delay: for every select value, measures the delay of rising
// and falling input edges; it must be (sel + 1) * UNIT_DELAY.
`timescale 1ns/1ps
module tb_matched_delay;
  localparam int UNIT = 2;
  logic       in = 1'b0, out;
  logic [2:0] sel;
  realtime    t0, t1;
  int checks = 0, failures = 0;

  matched_delay #(.TAPS(8), .UNIT_DELAY(UNIT)) dut (.rst(1'b0), .in(in), .sel(sel), .out(out));

  initial begin
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      #50;
      for (int e = 0; e < 2; e++) begin
        t0 = $realtime;
        in = ~in;
        wait (out == in);
        t1 = $realtime;
        checks++;
        if (t1 - t0 != real'((s + 1) * UNIT)) begin
          failures++; $display("FAIL sel %0d: delay %0.1f", s, t1 - t0);
        end
        #40;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
