// tb_desync_mips: end-to-end test of the processor in both clocking modes,
// with the top at its default parameters.
// The test program runs first with the global clock (synchronous mode), then
// with the handshake ring (desynchronized mode) at two settings of the
// delay-select pins, then once more synchronously. Each run is compared with
// the reference interpreter: final memory and number of machine cycles
// (counted as write-back clock edges). In desynchronized mode the testbench
// also checks that the five ring outputs pulse in order 0,1,2,3,4 in every
// machine cycle, that a machine cycle gets longer when the matched delays
// are made longer (by five times the added matched delay), and that the ring stops when a delay path is broken
// (the stall that makes the circuit self-checking).
// Mechanisms counted, each of which must occur: sync runs, desync runs,
// mode switches, delay-select changes, ring rounds, lb, sb, R-type, addi,
// beq taken and not taken, j, stall detected. Alongside, 40 tokens are
// streamed through the fork-join pipeline and each result is checked.
`timescale 1ns/1ps
module tb_desync_mips;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  localparam int SELW = 3;

  logic                 clk = 1'b0, rst = 1'b0, desync = 1'b1, clk_en = 1'b0;
  logic [4:0][SELW-1:0] dsel;
  logic [7:0]           memdata, adr, writedata;
  logic                 memread, memwrite, memclk;
  state_t               state;
  pcsrc_t               pcsource;
  logic [4:0]           async_out;
  logic                 fj_in_req = 1'b0, fj_in_ack, fj_out_req, fj_out_ack = 1'b0;
  logic [7:0]           fj_in_data, fj_out_data, fj_sent [$];
  int                   n_fj = 0;
  mem_t                 mem, ref_mem;
  int checks = 0, failures = 0;
  int cycles, order_bad, expect_stage;
  int ninstr, ncycles, nbt, nbn;
  realtime t_start, t_end, per_cycle_short, per_cycle_long;
  int n_sync = 0, n_desync = 0, n_switch = 0, n_dsel = 0, n_rounds = 0;
  int n_lb = 0, n_sb = 0, n_r = 0, n_addi = 0, n_beq_t = 0, n_beq_n = 0, n_j = 0, n_stall = 0;

  always #10 if (clk_en) clk = ~clk; else clk = 1'b0;

  desync_mips dut (
    .clk(clk), .rst(rst), .desync(desync), .dsel(dsel), .memdata(memdata),
    .memread(memread), .memwrite(memwrite), .adr(adr), .writedata(writedata),
    .memclk(memclk), .state(state), .pcsource(pcsource), .async_out(async_out),
    .fj_dsel(3'd2), .fj_in_req(fj_in_req), .fj_in_ack(fj_in_ack), .fj_in_data(fj_in_data),
    .fj_out_req(fj_out_req), .fj_out_ack(fj_out_ack), .fj_out_data(fj_out_data)
  );

  // Fork-join pipeline: stream tokens through it while the processor runs
  initial begin
    wait (rst); wait (!rst);
    for (int i = 0; i < 40; i++) begin
      fj_in_data = 8'($urandom);
      fj_sent.push_back(fj_in_data);
      #($urandom_range(0, 10));
      fj_in_req = 1'b1; wait (fj_in_ack);
      fj_in_req = 1'b0; wait (!fj_in_ack);
    end
  end
  initial begin
    wait (rst); wait (!rst);
    forever begin
    logic [7:0] x;
    wait (fj_out_req);
    x = fj_sent.pop_front();
    checks++;
    if (fj_out_data !== 8'(2 * x + 2)) begin
      failures++; $display("FAIL fork-join output %02x for %02x", fj_out_data, x);
    end
    n_fj++;
    #($urandom_range(0, 10));
    fj_out_ack = 1'b1; wait (!fj_out_req);
    fj_out_ack = 1'b0;
    end
  end

  assign memdata = mem[adr];
  always @(posedge memclk) if (!rst && memwrite) mem[adr] <= writedata;

  // Machine cycles and instruction mix, sampled at the write-back clock
  always @(posedge memclk) if (!rst) begin
    cycles++;
    case (state)
      S_LBWR:    n_lb++;
      S_SBWR:    n_sb++;
      S_RTYPEWR: n_r++;
      S_ADDIWR:  n_addi++;
      S_JEX:     n_j++;
      S_BEQEX:   if (pcsource == PCSRC_ALUOUT && dut.u_mips.u_ctrl.ctrl.pcen) n_beq_t++;
                 else n_beq_n++;
      default: ;
    endcase
  end

  // Ring order: in desynchronized mode the outputs must rise 0,1,2,3,4,0,...
  for (genvar k = 0; k < 5; k++) begin : g_ord
    always @(posedge async_out[k]) if (desync && !rst) begin
      if (k != expect_stage) order_bad++;
      expect_stage = (k + 1) % 5;
      if (k == 4) n_rounds++;
    end
  end

  task automatic run_program(input logic [7:0] x, input logic [7:0] n, input logic mode,
                             input logic [2:0] dval, output realtime per_cycle);
    if (mode != desync) n_switch++;
    rst = 1'b0; #1;
    rst = 1'b1; clk_en = 1'b0;
    #50;
    desync = mode;
    if (dsel[0] != dval) n_dsel++;
    for (int k = 0; k < 5; k++) dsel[k] = dval;   // delay selects change only in reset
    load_program(mem, x, n);
    ref_mem = mem;
    iss_run(ref_mem, ninstr, ncycles, nbt, nbn);
    cycles = 0; order_bad = 0; expect_stage = 0;
    #50;
    t_start = $realtime;
    rst = 1'b0;
    clk_en = !mode;
    while (!(state == S_FETCH1 && adr == HALT_ADR) && cycles < 5000 && $realtime - t_start < 2e6)
      #1;
    t_end = $realtime;
    per_cycle = (t_end - t_start) / real'(cycles);
    if (mode) n_desync++; else n_sync++;
    checks++;
    if (cycles != ncycles) begin
      failures++; $display("FAIL mode %0d: %0d cycles, expected %0d", mode, cycles, ncycles);
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin
        failures++;
        $display("FAIL mode %0d: mem[%02x]=%02x expected %02x", mode, i, mem[i], ref_mem[i]);
      end
    end
    if (mode) begin
      checks++;
      if (order_bad != 0) begin failures++; $display("FAIL ring order errors %0d", order_bad); end
    end
    $display("mode %0d: %0d instructions, %0d cycles, %0.1f ns per cycle",
             mode, ninstr, cycles, per_cycle);
  endtask

  initial begin
    realtime pc_sync;
    for (int k = 0; k < 5; k++) dsel[k] = 3'd1;

    run_program(8'd5, 8'd3, 1'b0, 3'd1, pc_sync);
    checks++;
    if (pc_sync < 19.5 || pc_sync > 20.5) begin failures++; $display("FAIL sync cycle %0.1f ns", pc_sync); end

    run_program(8'd5, 8'd3, 1'b1, 3'd1, per_cycle_short);
    run_program(8'd77, 8'd4, 1'b1, 3'd6, per_cycle_long);
    checks++;
    // five stages, each 5 delay units of 2 ns longer
    if (per_cycle_long - per_cycle_short < 49.0 || per_cycle_long - per_cycle_short > 51.0) begin
      failures++; $display("FAIL longer delays did not slow the ring");
    end

    run_program(8'd200, 8'd2, 1'b0, 3'd6, pc_sync);

    // Stall: hold one controller's left request low and watch the ring stop
    rst = 1'b1;
    for (int k = 0; k < 5; k++) dsel[k] = 3'd1; #50; desync = 1'b1; n_switch++; #50; rst = 1'b0;
    #500;
    force dut.u_ring.lr[2] = 1'b0;
    #300;
    begin
      int c_before;
      c_before = cycles;
      #2000;
      checks++;
      if (cycles == c_before) n_stall++;
      else begin failures++; $display("FAIL ring kept running with a broken request"); end
    end
    release dut.u_ring.lr[2];
    rst = 1'b1;

    // Every mechanism must have occurred
    checks++;
    if (n_sync == 0 || n_desync == 0 || n_switch == 0 || n_dsel == 0 || n_rounds == 0 ||
        n_lb == 0 || n_sb == 0 || n_r == 0 || n_addi == 0 || n_beq_t == 0 || n_beq_n == 0 ||
        n_j == 0 || n_stall == 0 || n_fj != 40) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("sync runs %0d, desync runs %0d, mode switches %0d, delay changes %0d, ring rounds %0d",
             n_sync, n_desync, n_switch, n_dsel, n_rounds);
    $display("fork-join tokens %0d", n_fj);
    $display("lb %0d, sb %0d, rtype %0d, addi %0d, beq taken %0d, beq not taken %0d, j %0d, stall %0d",
             n_lb, n_sb, n_r, n_addi, n_beq_t, n_beq_n, n_j, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
