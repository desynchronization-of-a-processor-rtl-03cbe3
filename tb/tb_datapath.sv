// tb_datapath: drives the datapath with hand-written control words, one
// machine cycle at a time, with the five register clocks pulsed one after
// another (instruction bytes 0..3, then write-back) as the handshake ring
// does. Runs addi, sb, lb, add, sb, beq (taken) and j, and checks the fetch
// addresses, the decoded opcode and function fields, the stored bytes, the
// zero flag and the branch and jump targets against values worked out here.
`timescale 1ns/1ps
module tb_datapath;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  logic [3:0] clk_ir = '0;
  logic       clk_wb = 1'b0, rst = 1'b0;
  logic [7:0] memdata, adr, writedata;
  ctrl_t      ctrl;
  aluctl_t    alucont;
  logic       zero;
  opcode_t    op;
  logic [5:0] funct;
  mem_t       mem;
  int checks = 0, failures = 0;

  datapath #(.WIDTH(8), .REGBITS(3)) dut (
    .clk_ir(clk_ir), .clk_wb(clk_wb), .rst(rst), .memdata(memdata), .ctrl(ctrl),
    .alucont(alucont), .zero(zero), .op(op), .funct(funct), .adr(adr), .writedata(writedata)
  );

  assign memdata = mem[adr];
  always @(posedge clk_wb) if (ctrl.memwrite) mem[adr] <= writedata;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // One machine cycle: apply the control word, pulse the five clocks in order
  task automatic cycle(input ctrl_t c, input aluctl_t ac);
    ctrl = c; alucont = ac;
    #2;
    for (int i = 0; i < 4; i++) begin clk_ir[i] = 1'b1; #2; clk_ir[i] = 1'b0; #1; end
    clk_wb = 1'b1; #2; clk_wb = 1'b0; #1;
  endtask

  function automatic ctrl_t cw();
    ctrl_t c = '0;
    c.pcsource = PCSRC_ALU;
    c.aluop = ALUOP_ADD;
    return c;
  endfunction

  task automatic fetch(input logic [7:0] exp_pc, input logic [31:0] exp_word);
    ctrl_t c;
    for (int i = 0; i < 4; i++) begin
      c = cw(); c.memread = 1; c.irwrite = 4'(1 << i); c.alusrcb = 2'b01; c.pcen = 1;
      ctrl = c; #1;
      check(adr == 8'(exp_pc + 8'(i)), $sformatf("fetch adr %02x expected %02x", adr, exp_pc + 8'(i)));
      cycle(c, ALU_ADD);
    end
    c = cw(); c.alusrcb = 2'b11;           // decode: aluout = pc + imm*4
    ctrl = c; #1;
    check(op == opcode_t'(exp_word[31:26]), "opcode");
    check(funct == exp_word[5:0], "funct");
    cycle(c, ALU_ADD);
  endtask

  task automatic memadr();
    ctrl_t c = cw(); c.alusrca = 1; c.alusrcb = 2'b10;
    cycle(c, ALU_ADD);
  endtask

  logic [31:0] prog [9];
  initial begin
    ctrl_t c;
    logic [7:0] x, y;
    x = 8'($urandom); y = 8'($urandom);
    for (int i = 0; i < 256; i++) mem[i] = 8'(i);
    prog[0] = enc_i(6'b001000, 0, 2, x);          // 00 addi r2, r0, x
    prog[1] = enc_i(6'b101000, 0, 2, 8'h60);      // 04 sb   r2, 0x60(r0)
    prog[2] = enc_i(6'b100000, 0, 3, 8'h61);      // 08 lb   r3, 0x61(r0)
    prog[3] = enc_r(2, 3, 4, 6'b100000);          // 0C add  r4, r2, r3
    prog[4] = enc_i(6'b101000, 0, 4, 8'h62);      // 10 sb   r4, 0x62(r0)
    prog[5] = enc_i(6'b000100, 4, 4, 8'h02);      // 14 beq  r4, r4, +2 -> 0x20
    prog[8] = enc_j(8'h0C);                       // 20 j    0x0C
    for (int i = 0; i < 9; i++) if (i < 6 || i == 8) put(mem, 8'(4 * i), prog[i]);
    mem[8'h61] = y;

    rst = 1'b1; #1; rst = 1'b0; #1;

    fetch(8'h00, prog[0]);
    c = cw(); c.alusrca = 1; c.alusrcb = 2'b10; cycle(c, ALU_ADD);      // addi ex
    c = cw(); c.regwrite = 1; cycle(c, ALU_ADD);                         // addi wr

    fetch(8'h04, prog[1]);
    memadr();
    c = cw(); c.memwrite = 1; c.iord = 1; ctrl = c; #1;
    check(adr == 8'h60, "sb address");
    check(writedata == x, "sb data");
    cycle(c, ALU_ADD);
    check(mem[8'h60] == x, "stored x");

    fetch(8'h08, prog[2]);
    memadr();
    c = cw(); c.memread = 1; c.iord = 1; ctrl = c; #1;
    check(adr == 8'h61, "lb address");
    cycle(c, ALU_ADD);
    c = cw(); c.regwrite = 1; c.memtoreg = 1; cycle(c, ALU_ADD);

    fetch(8'h0C, prog[3]);
    c = cw(); c.alusrca = 1; c.aluop = ALUOP_FUNCT; cycle(c, ALU_ADD);
    c = cw(); c.regwrite = 1; c.regdst = 1; cycle(c, ALU_ADD);

    fetch(8'h10, prog[4]);
    memadr();
    c = cw(); c.memwrite = 1; c.iord = 1; cycle(c, ALU_ADD);
    check(mem[8'h62] == 8'(x + y), $sformatf("stored sum %02x expected %02x", mem[8'h62], 8'(x + y)));

    fetch(8'h14, prog[5]);
    c = cw(); c.alusrca = 1; c.aluop = ALUOP_SUB; c.pcsource = PCSRC_ALUOUT; ctrl = c;
    alucont = ALU_SUB; #1;
    check(zero == 1'b1, "beq zero");
    c.pcen = zero;
    cycle(c, ALU_SUB);

    fetch(8'h20, prog[8]);
    c = cw(); c.pcsource = PCSRC_JUMP; c.pcen = 1; cycle(c, ALU_ADD);
    ctrl = cw(); #1;
    check(adr == 8'h0C, $sformatf("jump target %02x", adr));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
