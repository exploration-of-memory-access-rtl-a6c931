// block_sram: one block of the reconfigurable L2 SRAM.
// A block is built from several 36Kb FPGA block RAMs; with the default
// 4096 x 64 it is eight of them used 4096 x 8 data bits each (the ninth
// parity bit of each BRAM is not used). Simple dual port: one write port and
// one read port with a registered read (data valid one cycle after re).
// The block count per L2 and the BRAMs per block follow the document; the
// word shape is this design's choice.
module block_sram #(
  parameter int DEPTH = 4096,
  parameter int WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
