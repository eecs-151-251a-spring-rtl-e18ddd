// riscv_top: the two RV32I machines of the design, side by side.
//
// u_sc is the single-cycle machine with its own instruction memory and an
// asynchronous-read data memory. u_p3 is the 3-stage (I, X, M) pipelined
// machine with its own instruction memory and a data memory whose read is
// clocked at the start of M. The two share only clock and reset. Each
// instruction memory has a program-load port (*_prog_*) to be used while
// rst is high. Outputs per machine: the CSR value (a program can report a
// result or a done flag there), a retire strobe and the PC (single-cycle)
// or the hazard event flags (pipeline). Memory sizes (IMEM_WORDS,
// DMEM_WORDS words), RESET_PC and CSR_ADDR are this design's choices.
module riscv_top
  import riscv_pkg::*;
#(
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000,
  parameter logic [11:0] CSR_ADDR   = 12'h51E
) (
  input  logic          clk,
  input  logic          rst,
  // single-cycle machine
  input  logic          sc_prog_we,
  input  logic [31:0]   sc_prog_addr,
  input  logic [31:0]   sc_prog_data,
  output logic [31:0]   sc_csr,
  output logic          sc_retire,
  output logic [31:0]   sc_pc,
  // 3-stage pipelined machine
  input  logic          p3_prog_we,
  input  logic [31:0]   p3_prog_addr,
  input  logic [31:0]   p3_prog_data,
  output logic [31:0]   p3_csr,
  output logic          p3_retire,
  output pipe3_events_t p3_events
);
  // ---------------- single-cycle ----------------
  logic [31:0] sc_iaddr, sc_inst, sc_daddr, sc_dwdata, sc_drdata;
  logic [3:0]  sc_dbe;
  logic        sc_dwe, sc_dre;

  riscv_single_cycle #(.RESET_PC(RESET_PC), .CSR_ADDR(CSR_ADDR)) u_sc (
    .clk, .rst, .imem_addr(sc_iaddr), .imem_rdata(sc_inst),
    .dmem_addr(sc_daddr), .dmem_wdata(sc_dwdata), .dmem_be(sc_dbe),
    .dmem_we(sc_dwe), .dmem_re(sc_dre), .dmem_rdata(sc_drdata),
    .csr_value(sc_csr), .retire(sc_retire)
  );
  imem #(.WORDS(IMEM_WORDS)) u_sc_imem (
    .clk, .addr(sc_iaddr), .rdata(sc_inst),
    .we(sc_prog_we), .waddr(sc_prog_addr), .wdata(sc_prog_data)
  );
  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b0)) u_sc_dmem (
    .clk, .addr(sc_daddr), .we(sc_dwe), .be(sc_dbe), .wdata(sc_dwdata),
    .re(sc_dre), .rdata(sc_drdata)
  );
  assign sc_pc = sc_iaddr;

  // ---------------- 3-stage pipeline ----------------
  logic [31:0] p3_iaddr, p3_inst, p3_daddr, p3_dwdata, p3_drdata;
  logic [3:0]  p3_dbe;
  logic        p3_dwe, p3_dre;

  riscv_pipe3 #(.RESET_PC(RESET_PC), .CSR_ADDR(CSR_ADDR)) u_p3 (
    .clk, .rst, .imem_addr(p3_iaddr), .imem_rdata(p3_inst),
    .dmem_addr(p3_daddr), .dmem_wdata(p3_dwdata), .dmem_be(p3_dbe),
    .dmem_we(p3_dwe), .dmem_re(p3_dre), .dmem_rdata(p3_drdata),
    .csr_value(p3_csr), .retire(p3_retire), .events(p3_events)
  );
  imem #(.WORDS(IMEM_WORDS)) u_p3_imem (
    .clk, .addr(p3_iaddr), .rdata(p3_inst),
    .we(p3_prog_we), .waddr(p3_prog_addr), .wdata(p3_prog_data)
  );
  dmem #(.WORDS(DMEM_WORDS), .SYNC_READ(1'b1)) u_p3_dmem (
    .clk, .addr(p3_daddr), .we(p3_dwe), .be(p3_dbe), .wdata(p3_dwdata),
    .re(p3_dre), .rdata(p3_drdata)
  );
endmodule
