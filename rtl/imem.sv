// imem: instruction memory.
//
// WORDS 32-bit words addressed by byte address; addr[1:0] are ignored and
// only the low address bits that index the array are decoded. The read is
// asynchronous: rdata follows addr within the cycle, as the state elements
// of the single-cycle machine require ("clock for write, not for read").
// The processors only read it; the write port (we/waddr/wdata, written at
// the rising edge) exists to load a program while the processor is held in
// reset. Size is this design's choice.
module imem #(
  parameter int WORDS = 1024,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
