// regfile: the RV32I integer register file, x0..x31.
//
// NREGS registers of XLEN bits with two asynchronous read ports (rs1, rs2)
// and one write port that updates at the rising clock edge when we = 1.
// Register 0 always reads 0 and writes to it are ignored. A read of the
// register being written in the same cycle returns the old value; the
// pipeline bypasses that case itself. Registers are not reset.
module regfile #(
  parameter int NREGS = 32,
  parameter int XLEN  = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic [AW-1:0]   ra1,
  input  logic [AW-1:0]   ra2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [AW-1:0]   wa,
  input  logic [XLEN-1:0] wd
);
  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && wa != '0) regs[wa] <= wd;
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
