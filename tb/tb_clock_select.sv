// tb_clock_select: each stage clock follows clk in synchronous mode and its
// own asynchronous input in desynchronized mode, for random input patterns.
`timescale 1ns/1ps
module tb_clock_select;
  logic       clk, desync;
  logic [4:0] async_in, stage_clk, expected;
  int checks = 0, failures = 0;

  clock_select #(.N(5)) dut (.clk(clk), .desync(desync), .async_in(async_in), .stage_clk(stage_clk));

  initial begin
    for (int n = 0; n < 500; n++) begin
      clk = 1'($urandom); desync = 1'($urandom); async_in = 5'($urandom);
      #1;
      expected = desync ? async_in : {5{clk}};
      checks++;
      if (stage_clk !== expected) begin
        failures++; $display("FAIL desync %0d clk %0d async %b: %b", desync, clk, async_in, stage_clk);
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
