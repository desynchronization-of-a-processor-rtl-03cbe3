// tb_mips: runs the test program on the processor with all five register
// clocks tied to one clock (synchronous operation) and compares the final
// memory and the cycle count with the reference interpreter. Also checks
// the memread pattern: high in all four fetch cycles of every instruction.
`timescale 1ns/1ps
module tb_mips;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic       clk = 1'b0, rst = 1'b1;
  logic [7:0] memdata, adr, writedata;
  logic       memread, memwrite;
  state_t     state;
  pcsrc_t     pcsource;
  mem_t       mem, ref_mem;
  int checks = 0, failures = 0;
  int cycles = 0, fetch_cycles = 0, fetch_bad = 0, exec_reads = 0;
  int ninstr, ncycles, nbt, nbn;

  always #10 clk = ~clk;

  mips dut (
    .clk_ir({4{clk}}), .clk_wb(clk), .rst(rst), .memdata(memdata),
    .memread(memread), .memwrite(memwrite), .adr(adr), .writedata(writedata),
    .state(state), .pcsource(pcsource)
  );

  assign memdata = mem[adr];
  always @(posedge clk) if (!rst && memwrite) mem[adr] <= writedata;

  always @(posedge clk) if (!rst) begin
    cycles++;
    if (state inside {S_FETCH1, S_FETCH2, S_FETCH3, S_FETCH4}) begin
      fetch_cycles++;
      if (!memread || memwrite) fetch_bad++;
    end else if (memread) exec_reads++;
  end

  task automatic run_case(input logic [7:0] x, input logic [7:0] n);
    load_program(mem, x, n);
    ref_mem = mem;
    iss_run(ref_mem, ninstr, ncycles, nbt, nbn);
    rst = 1'b1; cycles = 0; fetch_cycles = 0; fetch_bad = 0; exec_reads = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    while (!(state == S_FETCH1 && adr == HALT_ADR) && cycles < 5000) @(negedge clk);
    checks++;
    if (cycles != ncycles) begin
      failures++; $display("FAIL cycles %0d expected %0d", cycles, ncycles);
    end
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (mem[i] !== ref_mem[i]) begin
        failures++; $display("FAIL mem[%02x]=%02x expected %02x", i, mem[i], ref_mem[i]);
      end
    end
    checks++;
    if (fetch_bad != 0 || fetch_cycles != 4 * ninstr) begin
      failures++; $display("FAIL fetch memread pattern bad=%0d fetch=%0d", fetch_bad, fetch_cycles);
    end
    checks++;
    // only lb reads memory outside the fetch: two loads per program
    if (exec_reads != 2) begin failures++; $display("FAIL exec reads %0d", exec_reads); end
  endtask

  initial begin
    run_case(8'd5, 8'd3);
    run_case(8'd9, 8'd1);
    run_case(8'd200, 8'd4);
    run_case(8'd1, 8'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
