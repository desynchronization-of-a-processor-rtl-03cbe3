// tb_regfile: random writes and reads against a model array; register 0
// must read as zero whatever is written to it; writes need we.
`timescale 1ns/1ps
module tb_regfile;
  logic       clk = 1'b0, we;
  logic [2:0] ra1, ra2, wa;
  logic [7:0] wd, rd1, rd2;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  regfile #(.WIDTH(8), .REGBITS(3)) dut (
    .wclk(clk), .we(we), .ra1(ra1), .ra2(ra2), .wa(wa), .wd(wd), .rd1(rd1), .rd2(rd2)
  );

  initial begin
    we = 1'b1;
    for (int i = 0; i < 8; i++) begin
      wa = 3'(i); wd = 8'(i * 3 + 1); model[i] = (i == 0) ? 8'h00 : wd;
      @(negedge clk);
    end
    for (int n = 0; n < 1000; n++) begin
      we  = 1'($urandom);
      wa  = 3'($urandom); wd = 8'($urandom);
      ra1 = 3'($urandom); ra2 = 3'($urandom);
      #1;
      checks += 2;
      if (rd1 !== model[ra1]) begin failures++; $display("FAIL rd1 r%0d", ra1); end
      if (rd2 !== model[ra2]) begin failures++; $display("FAIL rd2 r%0d", ra2); end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
