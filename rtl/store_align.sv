// store_align: store data placement for SB, SH and SW.
//
// The data memory is written a word at a time with one enable per byte.
// This block replicates the low byte (SB) or halfword (SH) of the store
// data onto every lane and enables only the lane(s) the address selects;
// SW enables all four. Combinational. Alignment is not checked: a halfword
// store uses addr_lo[1] to choose the half.
module store_align
  import riscv_pkg::*;
(
  input  logic [31:0] data,
  input  logic [1:0]  addr_lo,
  input  logic [2:0]  funct3,
  output logic [31:0] wdata,
  output logic [3:0]  be
);
  always_comb begin
    unique case (funct3[1:0])
      2'b00: begin
        wdata = {4{data[7:0]}};
        be    = 4'b0001 << addr_lo;
      end
      2'b01: begin
        wdata = {2{data[15:0]}};
        be    = addr_lo[1] ? 4'b1100 : 4'b0011;
      end
      default: begin
        wdata = data;
        be    = 4'b1111;
      end
    endcase
  end
endmodule
