// datapath: 8-bit datapath of the multicycle MIPS.
// Holds the PC, the 32-bit instruction register as four byte registers
// (ir0 = bits 7:0 ... ir3 = bits 31:24), the memory data register, the A/B
// operand registers, the ALUOut register, the register file and the ALU.
// The memory address is the PC or ALUOut; the write data is B.
// Clocking: the register groups have separate clocks so that each can be
// driven by its own handshake controller. clk_ir[i] loads instruction byte i
// (when irwrite[i]); clk_wb loads PC, MDR, A, B, ALUOut and the register
// file. All loads are on rising edges; rst clears the PC asynchronously.
// With all five clocks tied together this is an ordinary synchronous
// multicycle datapath. The split into four byte-wide instruction registers
// with one clock each, and a fifth clock for the write-back stage, follows
// the document; operand sizes beyond the 8-bit data and PC are this design's
// choice.
`timescale 1ns/1ps
module datapath
  import mips_pkg::*;
#(
  parameter int WIDTH   = 8,
  parameter int REGBITS = 3
) (
  input  logic [3:0]       clk_ir,
  input  logic             clk_wb,
  input  logic             rst,
  input  logic [WIDTH-1:0] memdata,
  input  ctrl_t            ctrl,
  input  aluctl_t          alucont,
  output logic             zero,
  output opcode_t          op,
  output logic [5:0]       funct,
  output logic [WIDTH-1:0] adr,
  output logic [WIDTH-1:0] writedata
);
  logic [31:0]        instr;
  logic [WIDTH-1:0]   pc, nextpc, mdr, a, b, aluout, aluresult;
  logic [WIDTH-1:0]   rd1, rd2, wd, srca, srcb, imm;
  logic [REGBITS-1:0] wa;

  // Instruction register: one byte per fetch cycle, each on its own clock
  for (genvar i = 0; i < 4; i++) begin : g_ir
    logic [7:0] q;
    always_ff @(posedge clk_ir[i])
      if (ctrl.irwrite[i]) q <= memdata[7:0];
    assign instr[8*i +: 8] = q;
  end
  assign op    = opcode_t'(instr[31:26]);
  assign funct = instr[5:0];
  assign imm   = WIDTH'(instr[7:0]);

  // Write-back stage registers
  always_ff @(posedge clk_wb or posedge rst)
    if (rst)            pc <= '0;
    else if (ctrl.pcen) pc <= nextpc;

  always_ff @(posedge clk_wb) begin
    mdr    <= memdata;
    a      <= rd1;
    b      <= rd2;
    aluout <= aluresult;
  end

  assign wa = ctrl.regdst ? instr[11+REGBITS-1:11] : instr[16+REGBITS-1:16];
  assign wd = ctrl.memtoreg ? mdr : aluout;

  regfile #(.WIDTH(WIDTH), .REGBITS(REGBITS)) u_rf (
    .wclk(clk_wb), .we(ctrl.regwrite),
    .ra1(instr[21+REGBITS-1:21]), .ra2(instr[16+REGBITS-1:16]),
    .wa(wa), .wd(wd), .rd1(rd1), .rd2(rd2)
  );

  always_comb begin
    srca = ctrl.alusrca ? a : pc;
    unique case (ctrl.alusrcb)
      2'b00:   srcb = b;
      2'b01:   srcb = WIDTH'(1);
      2'b10:   srcb = imm;
      default: srcb = imm << 2;
    endcase
  end

  alu #(.WIDTH(WIDTH)) u_alu (
    .a(srca), .b(srcb), .op(alucont), .result(aluresult), .zero(zero)
  );

  always_comb begin
    unique case (ctrl.pcsource)
      PCSRC_ALU:    nextpc = aluresult;
      PCSRC_ALUOUT: nextpc = aluout;
      default:      nextpc = WIDTH'({instr[WIDTH-3:0], 2'b00});
    endcase
  end

  assign adr       = ctrl.iord ? aluout : pc;
  assign writedata = b;
endmodule
