// tb_fj_pipeline: streams 60 random words through the fork-join pipeline
// with a random-speed producer and consumer. Each output must be 2x + 2 for
// the matching input x, in order, with none lost or duplicated; a second
// burst checks that the producer is held off (in_ack stays low) while the
// consumer does not acknowledge, i.e. that back-pressure reaches the input
// through the join, both branches and the fork.
`timescale 1ns/1ps
module tb_fj_pipeline;
  logic       rst = 1'b0, in_req = 1'b0, in_ack, out_req, out_ack = 1'b0;
  logic [7:0] in_data, out_data;
  logic [2:0] dsel = 3'd2;
  logic [7:0] sent [$];
  int checks = 0, failures = 0, nin = 0, nout = 0, held = 0;
  bit consumer_on = 1'b1;

  fj_pipeline #(.WIDTH(8)) dut (
    .rst(rst), .dsel(dsel), .in_req(in_req), .in_ack(in_ack), .in_data(in_data),
    .out_req(out_req), .out_ack(out_ack), .out_data(out_data)
  );

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t %s", $time, msg); end
  endtask

  task automatic produce(input int count);
    for (int i = 0; i < count; i++) begin
      in_data = 8'($urandom);
      sent.push_back(in_data);
      #($urandom_range(0, 20));
      in_req = 1'b1;
      wait (in_ack);
      #($urandom_range(0, 5));
      in_req = 1'b0;
      wait (!in_ack);
      nin++;
    end
  endtask

  // consumer
  initial forever begin
    wait (out_req && consumer_on);
    checks++;
    if (sent.size() == 0) begin failures++; $display("FAIL output without input"); end
    else begin
      logic [7:0] x;
      x = sent.pop_front();
      if (out_data !== 8'(2 * x + 2)) begin
        failures++; $display("FAIL out %02x for in %02x", out_data, x);
      end
    end
    nout++;
    #($urandom_range(0, 20));
    out_ack = 1'b1;
    wait (!out_req);
    #($urandom_range(0, 5));
    out_ack = 1'b0;
  end

  initial begin
    #1 rst = 1'b1; #100 rst = 1'b0;
    produce(60);
    wait (nout == 60);
    check(nin == 60 && nout == 60, "token counts");
    // back-pressure: stop the consumer and feed until the input stalls
    consumer_on = 1'b0;
    fork
      produce(20);
      begin
        #3000;
        held = nin;
      end
    join_any
    check(held > 60 && held < 80, $sformatf("producer not held off (%0d accepted)", held - 60));
    consumer_on = 1'b1;
    wait (nout == 80);
    check(sent.size() == 0, "tokens left behind");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
