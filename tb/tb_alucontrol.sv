// tb_alucontrol: every aluop with every function code; the expected ALU
// operation is taken from the instruction-set definition written out here.
`timescale 1ns/1ps
module tb_alucontrol;
  import mips_pkg::*;
  aluop_t  aluop;
  logic [5:0] funct;
  aluctl_t alucont, expected;
  int checks = 0, failures = 0;

  alucontrol dut (.aluop(aluop), .funct(funct), .alucont(alucont));

  initial begin
    for (int o = 0; o < 3; o++)
      for (int f = 0; f < 64; f++) begin
        aluop = aluop_t'(o);
        funct = 6'(f);
        #1;
        if (o == 0) expected = ALU_ADD;
        else if (o == 1) expected = ALU_SUB;
        else case (f)
          32: expected = ALU_ADD;
          34: expected = ALU_SUB;
          36: expected = ALU_AND;
          37: expected = ALU_OR;
          42: expected = ALU_SLT;
          default: expected = ALU_ADD;
        endcase
        checks++;
        if (alucont !== expected) begin
          failures++; $display("FAIL aluop %0d funct %0d: %0d expected %0d", o, f, alucont, expected);
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
