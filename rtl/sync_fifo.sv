// sync_fifo: single-clock FIFO with valid/ready handshakes on both sides.
// Used as the output buffer of a PE array (ALU results waiting for the psum
// bus or for DRAM) and as the "To Psum/ALU" staging buffer between the last
// PE row and the ALUs. Data are written when in_valid && in_ready and appear
// on out_data the cycle after; out_data shows the oldest entry while
// out_valid is high. count reports the occupancy. Depth and width are
// parameters; the FIFO structure itself is this design's choice, the
// document only names the buffers.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             push, pop;

  assign in_ready  = (int'(count) < DEPTH);
  assign out_valid = (count != 0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wp] <= in_data;
        wp      <= (int'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (int'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      count <= count + ($bits(count))'(push) - ($bits(count))'(pop);
    end
  end
endmodule
