// riscv_pipe3: three-stage pipelined RV32I processor (stages I, X, M).
//
// The stages are cut at the three slowest parts of the single-cycle
// datapath: instruction memory, ALU and data memory.
//  I: the PC addresses the instruction memory (asynchronous read) and the
//     instruction is clocked into the instruction register (ir_x) together
//     with its PC.
//  X: the instruction register is decoded by the same control decoder as
//     the single-cycle machine, the register file is read, the ALU computes
//     the result, memory address or branch/jump target and the branch
//     comparator resolves branches. The data memory address, store data and
//     byte enables leave X and are clocked into the data memory on the edge
//     that starts M; CSR instructions update the CSR on that edge too.
//  M: the load word arrives from the data memory, is narrowed and extended,
//     and the write-back value is written into the register file at the end
//     of M.
// Hazards (see pipe3_hazard): the M result is bypassed to X's operands
// (ALU inputs, store data, comparator); an X instruction that reads the rd
// of a load in M waits one cycle (bubble into M); branches are predicted
// not taken, and a taken branch or a jump kills the instruction fetched
// behind it and refetches at the target, so it costs one extra cycle. CPI
// is 1 otherwise.
//
// Memory ports: imem (asynchronous read) and a data port whose read is
// registered on the X-to-M edge (dmem with SYNC_READ = 1). retire pulses
// when a valid instruction leaves M; events reports the hazard actions of
// the cycle. Synchronous active-high reset loads RESET_PC and empties X and
// M. Decoding and register read in X, RESET_PC and the CSR address are
// this design's choices.
module riscv_pipe3
  import riscv_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  parameter logic [11:0] CSR_ADDR = 12'h51E
) (
  input  logic          clk,
  input  logic          rst,
  output logic [31:0]   imem_addr,
  input  logic [31:0]   imem_rdata,
  output logic [31:0]   dmem_addr,
  output logic [31:0]   dmem_wdata,
  output logic [3:0]    dmem_be,
  output logic          dmem_we,
  output logic          dmem_re,
  input  logic [31:0]   dmem_rdata,
  output logic [31:0]   csr_value,
  output logic          retire,
  output pipe3_events_t events
);
  // ---------------- I stage ----------------
  logic [31:0] pc_i;

  // ---------------- X stage ----------------
  logic [31:0] ir_x, pc_x;
  logic        valid_x;
  ctrl_t       ctrl_x;
  logic        pc_sel_x, br_eq, br_lt;
  logic [31:0] imm_x, rf_rd1, rf_rd2, rs1_v, rs2_v, alu_a, alu_b, alu_y;
  logic [31:0] csr_old, csr_src, result_x;
  logic        fwd_a, fwd_b, stall, kill, go_x;

  // ---------------- M stage ----------------
  logic        valid_m, reg_wen_m, is_load_m;
  logic [4:0]  rd_m;
  logic [2:0]  funct3_m;
  logic [1:0]  addr_lo_m;
  logic [31:0] result_m, load_m, wb_m;

  assign imem_addr = pc_i;

  riscv_control u_ctrl (.inst(ir_x), .br_eq, .br_lt, .ctrl(ctrl_x), .pc_sel(pc_sel_x));

  regfile #(.NREGS(32), .XLEN(32)) u_rf (
    .clk, .ra1(ir_x[19:15]), .ra2(ir_x[24:20]), .rd1(rf_rd1), .rd2(rf_rd2),
    .we(valid_m && reg_wen_m), .wa(rd_m), .wd(wb_m)
  );

  pipe3_hazard u_hz (
    .x_valid(valid_x), .x_rs1(ir_x[19:15]), .x_rs2(ir_x[24:20]),
    .x_uses_rs1(ctrl_x.uses_rs1), .x_uses_rs2(ctrl_x.uses_rs2), .x_redirect(pc_sel_x),
    .m_valid(valid_m), .m_reg_wen(reg_wen_m), .m_rd(rd_m), .m_is_load(is_load_m),
    .fwd_a, .fwd_b, .stall, .kill
  );

  // ALU bypass from M
  assign rs1_v = fwd_a ? result_m : rf_rd1;
  assign rs2_v = fwd_b ? result_m : rf_rd2;

  imm_gen u_imm (.inst(ir_x), .sel(ctrl_x.imm_sel), .imm(imm_x));
  branch_comp u_bc (.a(rs1_v), .b(rs2_v), .br_un(ctrl_x.br_un), .br_eq, .br_lt);

  assign alu_a = ctrl_x.a_sel ? pc_x  : rs1_v;
  assign alu_b = ctrl_x.b_sel ? imm_x : rs2_v;
  alu u_alu (.a(alu_a), .b(alu_b), .op(ctrl_x.alu_op), .y(alu_y));

  // X instruction moves on to M this cycle
  assign go_x = valid_x && !stall;

  assign dmem_addr = alu_y;
  assign dmem_we   = go_x && ctrl_x.mem_wen;
  assign dmem_re   = go_x && ctrl_x.mem_ren;
  store_align u_st (.data(rs2_v), .addr_lo(alu_y[1:0]), .funct3(ctrl_x.funct3),
                    .wdata(dmem_wdata), .be(dmem_be));

  assign csr_src = ctrl_x.csr_imm ? {27'b0, ir_x[19:15]} : rs1_v;
  csr_reg #(.CSR_ADDR(CSR_ADDR)) u_csr (
    .clk, .rst, .en(go_x && ctrl_x.is_csr), .addr(ir_x[31:20]), .funct3(ctrl_x.funct3),
    .src(csr_src), .rdata(csr_old), .value(csr_value)
  );

  always_comb begin
    unique case (ctrl_x.wb_sel)
      WB_PC4:  result_x = pc_x + 32'd4;
      WB_CSR:  result_x = csr_old;
      default: result_x = alu_y;
    endcase
  end

  // PC and instruction register
  always_ff @(posedge clk) begin
    if (rst) begin
      pc_i    <= RESET_PC;
      valid_x <= 1'b0;
      ir_x    <= '0;
      pc_x    <= '0;
    end else if (!stall) begin
      if (kill) begin
        pc_i    <= {alu_y[31:1], 1'b0};
        valid_x <= 1'b0;
      end else begin
        pc_i    <= pc_i + 32'd4;
        ir_x    <= imem_rdata;
        pc_x    <= pc_i;
        valid_x <= 1'b1;
      end
    end
  end

  // X -> M pipeline register
  always_ff @(posedge clk) begin
    if (rst) begin
      valid_m   <= 1'b0;
      reg_wen_m <= 1'b0;
      is_load_m <= 1'b0;
      rd_m      <= '0;
      funct3_m  <= '0;
      addr_lo_m <= '0;
      result_m  <= '0;
    end else begin
      valid_m   <= go_x;
      reg_wen_m <= ctrl_x.reg_wen;
      is_load_m <= ctrl_x.mem_ren;
      rd_m      <= ir_x[11:7];
      funct3_m  <= ctrl_x.funct3;
      addr_lo_m <= alu_y[1:0];
      result_m  <= result_x;
    end
  end

  // M stage: load alignment and write-back select
  load_extend u_ld (.word(dmem_rdata), .addr_lo(addr_lo_m), .funct3(funct3_m), .data(load_m));
  assign wb_m   = is_load_m ? load_m : result_m;
  assign retire = valid_m;

  always_comb begin
    events.fwd_a = fwd_a;
    events.fwd_b = fwd_b;
    events.stall = stall;
    events.kill  = kill;
  end

`ifndef SYNTHESIS
  // A stalled instruction never writes memory.
  a_no_store_on_stall: assert property (@(posedge clk) disable iff (rst) stall |-> !dmem_we);
  // Bypass and stall are exclusive for an operand.
  a_fwd_xor_stall: assert property (@(posedge clk) disable iff (rst) stall |-> !(fwd_a || fwd_b));
`endif
endmodule
