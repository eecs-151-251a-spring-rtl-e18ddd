// csr_reg: a single control and status register for the Zicsr instructions.
//
// rdata returns the current value when addr equals CSR_ADDR (0 for any
// other address). When en is high at a rising clock edge and the address
// matches, the register is written (funct3[1:0] = 01, CSRRW/CSRRWI), has
// the bits of src set (10, CSRRS/CSRRSI) or cleared (11, CSRRC/CSRRCI).
// The datapath supplies src as rs1's value or the zero-extended 5-bit zimm.
// Synchronous reset to 0. Only one register is built; its address
// (a tohost-style 0x51E) is this design's choice.
module csr_reg #(
  parameter logic [11:0] CSR_ADDR = 12'h51E
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [11:0] addr,
  input  logic [2:0]  funct3,
  input  logic [31:0] src,
  output logic [31:0] rdata,
  output logic [31:0] value
);
  logic hit;
  assign hit   = (addr == CSR_ADDR);
  assign rdata = hit ? value : '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      value <= '0;
    end else if (en && hit) begin
      unique case (funct3[1:0])
        2'b01:   value <= src;
        2'b10:   value <= value | src;
        2'b11:   value <= value & ~src;
        default: ;
      endcase
    end
  end
endmodule
