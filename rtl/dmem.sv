// dmem: data memory with byte write enables.
//
// WORDS 32-bit words addressed by byte address (addr[1:0] ignored; the load
// and store alignment blocks handle the lanes). Writes happen at the rising
// clock edge for each byte whose be bit is set while we = 1. With
// SYNC_READ = 0 the read is asynchronous (single-cycle machine). With
// SYNC_READ = 1 the address is clocked at the same edge as a write when
// re = 1 and rdata holds that word during the following cycle: this is the
// pipeline's M stage, whose memory access is clocked on the leading edge of
// the stage. Contents are not reset. Size is this design's choice.
module dmem #(
  parameter int WORDS     = 1024,
  parameter bit SYNC_READ = 1'b0,
  localparam int AW       = $clog2(WORDS)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] wdata,
  input  logic        re,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int i = 0; i < 4; i++) begin
        if (be[i]) mem[idx][8*i +: 8] <= wdata[8*i +: 8];
      end
    end
  end

  if (SYNC_READ) begin : g_sync
    logic [31:0] rdata_q;
    always_ff @(posedge clk) begin
      if (re) rdata_q <= mem[idx];
    end
    assign rdata = rdata_q;
  end else begin : g_async
    assign rdata = mem[idx];
  end
endmodule
