// load_extend: narrow-load data extraction.
//
// The data memory returns the whole aligned word. This block picks the byte
// (addr_lo selects the lane) or halfword (addr_lo[1] selects the half)
// named by the load's funct3 and sign-extends (LB, LH) or zero-extends
// (LBU, LHU) it to 32 bits; LW passes the word. Combinational. Little-endian
// lane order follows RV32I.
module load_extend
  import riscv_pkg::*;
(
  input  logic [31:0] word,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] data
);
  logic [7:0]  byte_v;
  logic [15:0] half_v;

  always_comb begin
    byte_v = word[8*addr_lo +: 8];
    half_v = addr_lo[1] ? word[31:16] : word[15:0];
    unique case (funct3)
      F3_B:    data = {{24{byte_v[7]}}, byte_v};
      F3_H:    data = {{16{half_v[15]}}, half_v};
      F3_BU:   data = {24'b0, byte_v};
      F3_HU:   data = {16'b0, half_v};
      default: data = word;
    endcase
  end
endmodule
