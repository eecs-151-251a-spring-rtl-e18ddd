// riscv_single_cycle: one-instruction-per-cycle RV32I processor.
//
// Every clock cycle executes one whole instruction. The PC drives the
// instruction memory; the instruction feeds the control decoder, the
// register file read ports and the immediate generator. The ALU takes rs1
// or PC (ASel) and rs2 or the immediate (BSel); its result is the
// arithmetic result, the load/store address or the branch/jump target. The
// branch comparator runs on rs1/rs2 in parallel. Write-back selects the
// load data (narrowed and extended), the ALU result, PC+4 (links of JAL and
// JALR) or the old CSR value. At the rising edge PC, register file, data
// memory and CSR are all updated, so all state elements are read
// asynchronously and written synchronously.
//
// Memory ports: imem_addr/imem_rdata (asynchronous read) and a data port
// with byte enables (dmem_be) whose read data must also be asynchronous.
// retire is high in every cycle out of reset. JALR clears bit 0 of its
// target as RV32I requires. Reset (synchronous, active high) loads
// RESET_PC; RESET_PC and the single CSR at CSR_ADDR are this design's
// choices, as is treating FENCE/ECALL/EBREAK as no-operations.
module riscv_single_cycle
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  parameter logic [11:0] CSR_ADDR = 12'h51E
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  output logic [3:0]  dmem_be,
  output logic        dmem_we,
  output logic        dmem_re,
  input  logic [31:0] dmem_rdata,
  output logic [31:0] csr_value,
  output logic        retire
);
  logic [31:0] pc, pc_plus4, inst, imm, rs1_v, rs2_v, alu_a, alu_b, alu_y;
  logic [31:0] load_v, csr_old, csr_src, wb_data;
  logic        br_eq, br_lt, pc_sel;
  ctrl_t       ctrl;

  assign imem_addr = pc;
  assign inst      = imem_rdata;
  assign pc_plus4  = pc + 32'd4;

  riscv_control u_ctrl (.inst, .br_eq, .br_lt, .ctrl, .pc_sel);

  regfile #(.NREGS(32), .XLEN(32)) u_rf (
    .clk, .ra1(inst[19:15]), .ra2(inst[24:20]), .rd1(rs1_v), .rd2(rs2_v),
    .we(ctrl.reg_wen && !rst), .wa(inst[11:7]), .wd(wb_data)
  );

  imm_gen u_imm (.inst, .sel(ctrl.imm_sel), .imm);

  branch_comp u_bc (.a(rs1_v), .b(rs2_v), .br_un(ctrl.br_un), .br_eq, .br_lt);

  assign alu_a = ctrl.a_sel ? pc  : rs1_v;
  assign alu_b = ctrl.b_sel ? imm : rs2_v;
  alu u_alu (.a(alu_a), .b(alu_b), .op(ctrl.alu_op), .y(alu_y));

  assign dmem_addr = alu_y;
  assign dmem_we   = ctrl.mem_wen && !rst;
  assign dmem_re   = ctrl.mem_ren && !rst;
  store_align u_st (.data(rs2_v), .addr_lo(alu_y[1:0]), .funct3(ctrl.funct3),
                    .wdata(dmem_wdata), .be(dmem_be));
  load_extend u_ld (.word(dmem_rdata), .addr_lo(alu_y[1:0]), .funct3(ctrl.funct3),
                    .data(load_v));

  assign csr_src = ctrl.csr_imm ? {27'b0, inst[19:15]} : rs1_v;
  csr_reg #(.CSR_ADDR(CSR_ADDR)) u_csr (
    .clk, .rst, .en(ctrl.is_csr), .addr(inst[31:20]), .funct3(ctrl.funct3),
    .src(csr_src), .rdata(csr_old), .value(csr_value)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_MEM:  wb_data = load_v;
      WB_PC4:  wb_data = pc_plus4;
      WB_CSR:  wb_data = csr_old;
      default: wb_data = alu_y;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= RESET_PC;
    else     pc <= pc_sel ? {alu_y[31:1], 1'b0} : pc_plus4;
  end

  assign retire = !rst;
endmodule
