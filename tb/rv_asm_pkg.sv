// rv_asm_pkg: RV32I instruction encoders for the testbenches.
//
// Each function returns the 32-bit machine word of one instruction in the
// standard RV32I formats (R, I, S, B, U, J), so test programs can be
// written as lists of calls such as addi(5, 0, -50).
package rv_asm_pkg;
  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1,
                                      input logic [2:0] f3, input int rd, input logic [6:0] op);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input logic [2:0] f3,
                                      input int rd, input logic [6:0] op);
    logic [11:0] i = 12'(imm);
    return {i, 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1, input logic [2:0] f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs1, input int rs2, input logic [2:0] f3);
    logic [12:0] i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction

  function automatic logic [31:0] lui(input int rd, input int imm20);
    return {20'(imm20), 5'(rd), 7'b0110111};
  endfunction
  function automatic logic [31:0] auipc(input int rd, input int imm20);
    return {20'(imm20), 5'(rd), 7'b0010111};
  endfunction
  function automatic logic [31:0] jal(input int rd, input int off);
    logic [20:0] i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm);
    return i_t(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] br(input logic [2:0] f3, input int rs1, input int rs2, input int off);
    return b_t(off, rs1, rs2, f3);
  endfunction
  function automatic logic [31:0] load(input logic [2:0] f3, input int rd, input int rs1, input int imm);
    return i_t(imm, rs1, f3, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] store(input logic [2:0] f3, input int rs2, input int rs1, input int imm);
    return s_t(imm, rs2, rs1, f3);
  endfunction
  // OP-IMM; for shifts imm carries shamt and, for SRAI, bit 10 set.
  function automatic logic [31:0] opi(input logic [2:0] f3, input int rd, input int rs1, input int imm);
    return i_t(imm, rs1, f3, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] op(input logic [2:0] f3, input logic alt, input int rd, input int rs1, input int rs2);
    return r_t({1'b0, alt, 5'b0}, rs2, rs1, f3, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return opi(3'b000, rd, rs1, imm);
  endfunction
  function automatic logic [31:0] add(input int rd, input int rs1, input int rs2);
    return op(3'b000, 1'b0, rd, rs1, rs2);
  endfunction
  function automatic logic [31:0] sub(input int rd, input int rs1, input int rs2);
    return op(3'b000, 1'b1, rd, rs1, rs2);
  endfunction
  function automatic logic [31:0] csr(input logic [2:0] f3, input int rd, input int rs1_or_zimm, input int addr);
    return {12'(addr), 5'(rs1_or_zimm), f3, 5'(rd), 7'b1110011};
  endfunction
  function automatic logic [31:0] nop();
    return addi(0, 0, 0);
  endfunction
endpackage
