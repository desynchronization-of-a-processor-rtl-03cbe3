// mips_tb_pkg: test support for the 8-bit MIPS testbenches.
// Instruction encoders, a test program and an instruction-set reference
// model. The reference model interprets the program directly from the
// instruction-set rules (it shares no code with the RTL) and reports the
// final memory, the number of instructions and the number of machine cycles
// the multicycle implementation should take: four fetch cycles plus decode
// plus 3 (lb), 2 (sb, R-type, addi) or 1 (beq, j) execute cycles.
`timescale 1ns/1ps
package mips_tb_pkg;

  typedef logic [7:0] mem_t [256];

  localparam logic [7:0] HALT_ADR = 8'h50;

  function automatic logic [31:0] enc_r(int rs, int rt, int rd, logic [5:0] funct);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'b00000, funct};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, int rs, int rt, logic [7:0] imm);
    return {op, 5'(rs), 5'(rt), 8'h00, imm};
  endfunction

  function automatic logic [31:0] enc_j(logic [7:0] target);
    return {6'b000010, 20'h0, target[7:2]};
  endfunction

  function automatic void put(ref mem_t m, input logic [7:0] a, input logic [31:0] w);
    for (int i = 0; i < 4; i++) m[8'(a + 8'(i))] = w[8*i +: 8];
  endfunction

  // Test program: loads two operands, exercises every R-type operation,
  // stores the results, then multiplies by repeated addition in a loop
  // closed by beq and j, and halts in a jump to itself at HALT_ADR.
  function automatic void load_program(ref mem_t m, input logic [7:0] x, input logic [7:0] n);
    for (int i = 0; i < 256; i++) m[i] = 8'(i * 7 + 3);   // filler
    put(m, 8'h00, enc_i(6'b100000, 0, 2, 8'h80));        // lb   r2, 0x80(r0)
    put(m, 8'h04, enc_i(6'b100000, 0, 3, 8'h81));        // lb   r3, 0x81(r0)
    put(m, 8'h08, enc_r(2, 3, 4, 6'b100000));            // add  r4, r2, r3
    put(m, 8'h0C, enc_r(2, 3, 5, 6'b100010));            // sub  r5, r2, r3
    put(m, 8'h10, enc_r(2, 3, 6, 6'b100100));            // and  r6, r2, r3
    put(m, 8'h14, enc_r(2, 3, 7, 6'b100101));            // or   r7, r2, r3
    put(m, 8'h18, enc_r(3, 2, 1, 6'b101010));            // slt  r1, r3, r2
    put(m, 8'h1C, enc_i(6'b101000, 0, 4, 8'h90));        // sb   r4, 0x90(r0)
    put(m, 8'h20, enc_i(6'b101000, 0, 5, 8'h91));        // sb   r5, 0x91(r0)
    put(m, 8'h24, enc_i(6'b101000, 0, 6, 8'h92));        // sb   r6, 0x92(r0)
    put(m, 8'h28, enc_i(6'b101000, 0, 7, 8'h93));        // sb   r7, 0x93(r0)
    put(m, 8'h2C, enc_i(6'b101000, 0, 1, 8'h94));        // sb   r1, 0x94(r0)
    put(m, 8'h30, enc_i(6'b001000, 0, 4, 8'h00));        // addi r4, r0, 0
    put(m, 8'h34, enc_r(4, 2, 4, 6'b100000));            // loop: add r4, r4, r2
    put(m, 8'h38, enc_i(6'b001000, 3, 3, 8'hFF));        // addi r3, r3, -1
    put(m, 8'h3C, enc_i(6'b000100, 3, 0, 8'h01));        // beq  r3, r0, +1
    put(m, 8'h40, enc_j(8'h34));                         // j    loop
    put(m, 8'h44, enc_i(6'b101000, 0, 4, 8'h95));        // sb   r4, 0x95(r0)
    put(m, 8'h48, enc_r(2, 3, 1, 6'b101010));            // slt  r1, r2, r3
    put(m, 8'h4C, enc_i(6'b101000, 0, 1, 8'h96));        // sb   r1, 0x96(r0)
    put(m, HALT_ADR, enc_j(HALT_ADR));                   // halt: j halt
    m[8'h80] = x;
    m[8'h81] = n;
  endfunction

  // Reference interpreter. Runs until the PC reaches HALT_ADR.
  function automatic void iss_run(ref mem_t m, output int ninstr, output int ncycles,
                                  output int nbeq_taken, output int nbeq_not);
    logic [7:0]  r [8];
    logic [7:0]  pc, a, b, imm;
    logic [31:0] w;
    logic [5:0]  op;
    int rs, rt, rd;
    for (int i = 0; i < 8; i++) r[i] = '0;
    pc = 0; ninstr = 0; ncycles = 0; nbeq_taken = 0; nbeq_not = 0;
    while (pc != HALT_ADR && ninstr < 10000) begin
      w  = {m[8'(pc+3)], m[8'(pc+2)], m[8'(pc+1)], m[pc]};
      op = w[31:26]; rs = int'(w[23:21]); rt = int'(w[18:16]); rd = int'(w[13:11]);
      imm = w[7:0];
      a = (rs == 0) ? 8'h00 : r[rs];
      b = (rt == 0) ? 8'h00 : r[rt];
      pc = pc + 8'd4;
      ncycles += 5;
      ninstr++;
      case (op)
        6'b100000: begin if (rt != 0) r[rt] = m[8'(a + imm)]; ncycles += 3; end
        6'b101000: begin m[8'(a + imm)] = b; ncycles += 2; end
        6'b001000: begin if (rt != 0) r[rt] = a + imm; ncycles += 2; end
        6'b000100: begin
          if (a == b) begin pc = pc + (imm << 2); nbeq_taken++; end
          else nbeq_not++;
          ncycles += 1;
        end
        6'b000010: begin pc = {w[5:0], 2'b00}; ncycles += 1; end
        6'b000000: begin
          logic [7:0] res;
          case (w[5:0])
            6'b100000: res = a + b;
            6'b100010: res = a - b;
            6'b100100: res = a & b;
            6'b100101: res = a | b;
            6'b101010: res = ($signed(a) < $signed(b)) ? 8'd1 : 8'd0;
            default:   res = a + b;
          endcase
          if (rd != 0) r[rd] = res;
          ncycles += 2;
        end
        default: ;
      endcase
    end
  endfunction

endpackage
