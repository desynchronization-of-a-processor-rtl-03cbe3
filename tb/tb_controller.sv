// tb_controller: steps the control state machine through one instruction of
// each kind and checks, from an instruction-level description written here,
// the number of cycles to return to the first fetch cycle, the irwrite
// sequence of the four fetch cycles, how often memread, memwrite and
// regwrite are raised, the pcen behaviour of beq with zero high and low,
// and the multiplexer selects of the write-back cycle.
`timescale 1ns/1ps
module tb_controller;
  import mips_pkg::*;
  logic    clk = 1'b0, rst = 1'b0, zero;
  opcode_t op;
  ctrl_t   ctrl;
  state_t  state;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  controller dut (.clk(clk), .rst(rst), .op(op), .zero(zero), .ctrl(ctrl), .state(state));

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic one_instr(input opcode_t o, input logic z, input int exp_cycles,
                           input int exp_reads, input int exp_writes, input int exp_regw,
                           input int exp_pcen_exec);
    int cyc = 0, reads = 0, writes = 0, regw = 0, pcen_exec = 0;
    logic [3:0] irw [4];
    op = o; zero = z;
    @(negedge clk); rst = 1'b1; @(negedge clk); rst = 1'b0;
    do begin
      if (cyc < 4) irw[cyc] = ctrl.irwrite;
      else begin
        check(ctrl.irwrite == 4'b0000, "irwrite outside fetch");
        if (ctrl.pcen) pcen_exec++;
      end
      if (ctrl.memread) reads++;
      if (ctrl.memwrite) writes++;
      if (ctrl.regwrite) begin
        regw++;
        check(ctrl.memtoreg == (o == OP_LB), "memtoreg");
        check(ctrl.regdst == (o == OP_RTYPE), "regdst");
      end
      if (ctrl.memread || ctrl.memwrite) check(ctrl.iord == (cyc >= 4), "iord");
      @(negedge clk);
      cyc++;
    end while (state != S_FETCH1 && cyc < 20);
    check(cyc == exp_cycles, $sformatf("op %b cycles %0d expected %0d", o, cyc, exp_cycles));
    for (int i = 0; i < 4; i++) check(irw[i] == 4'(1 << i), "irwrite sequence");
    check(reads == exp_reads, $sformatf("op %b memread cycles %0d", o, reads));
    check(writes == exp_writes, $sformatf("op %b memwrite cycles %0d", o, writes));
    check(regw == exp_regw, $sformatf("op %b regwrite cycles %0d", o, regw));
    check(pcen_exec == exp_pcen_exec, $sformatf("op %b pcen after fetch %0d", o, pcen_exec));
  endtask

  initial begin
    //         op        zero  cycles reads writes regw pcen
    one_instr(OP_LB,     1'b0, 8,     5,    0,     1,   0);
    one_instr(OP_SB,     1'b0, 7,     4,    1,     0,   0);
    one_instr(OP_RTYPE,  1'b0, 7,     4,    0,     1,   0);
    one_instr(OP_ADDI,   1'b0, 7,     4,    0,     1,   0);
    one_instr(OP_BEQ,    1'b1, 6,     4,    0,     0,   1);
    one_instr(OP_BEQ,    1'b0, 6,     4,    0,     0,   0);
    one_instr(OP_J,      1'b0, 6,     4,    0,     0,   1);
    one_instr(opcode_t'(6'b111111), 1'b0, 5, 4, 0,    0,   0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
