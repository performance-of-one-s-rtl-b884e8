// General purpose register file of the MIPS-style datapath.
//
// 32 registers of 32 bits, register 0 reads as zero and ignores writes.
// Two asynchronous read ports feed the base register and the store data or
// second operand; a third read port lets the environment observe register
// contents.  One synchronous write port takes the write-back value.  All
// registers are cleared by the active-low synchronous reset.  The register
// file is a box of the block diagram; its organisation is that of the MIPS
// R2000/R3000 and its ports are this design's choice.
module oc_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned XLEN  = 32,
  localparam int unsigned A_W  = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [A_W-1:0]  ra1,
  output logic [XLEN-1:0] rd1,
  input  logic [A_W-1:0]  ra2,
  output logic [XLEN-1:0] rd2,
  input  logic [A_W-1:0]  ra3,
  output logic [XLEN-1:0] rd3,
  input  logic            we,
  input  logic [A_W-1:0]  wa,
  input  logic [XLEN-1:0] wd
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
  assign rd3 = (ra3 == '0) ? '0 : regs[ra3];

endmodule
