// tb_alu: random and corner operands for every ALU operation, compared with
// results computed here from the operation's definition; checks zero.
`timescale 1ns/1ps
module tb_alu;
  import mips_pkg::*;
  logic [7:0] a, b, result, expected;
  logic       zero;
  aluctl_t    op;
  int checks = 0, failures = 0;
  aluctl_t ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};

  alu #(.WIDTH(8)) dut (.a(a), .b(b), .op(op), .result(result), .zero(zero));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a  = (n < 16) ? 8'(n * 17) : 8'($urandom);
      b  = (n % 7 == 0) ? a : 8'($urandom);
      op = ops[n % 5];
      #1;
      case (op)
        ALU_AND: expected = a & b;
        ALU_OR:  expected = a | b;
        ALU_ADD: expected = 8'(int'(a) + int'(b));
        ALU_SUB: expected = 8'(int'(a) - int'(b));
        default: expected = (int'($signed(a)) < int'($signed(b))) ? 8'd1 : 8'd0;
      endcase
      checks += 2;
      if (result !== expected) begin
        failures++; $display("FAIL op %0d a %02x b %02x: %02x expected %02x", op, a, b, result, expected);
      end
      if (zero !== (expected == 0)) begin failures++; $display("FAIL zero"); end
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
