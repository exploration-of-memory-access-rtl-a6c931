// alu: post-processing lane attached to one column of a PE array.
// For each psum drained from the last PE row it forms
//   sum = pe_psum + (add_bus ? bus_psum : 0) + (add_local ? buf[idx] : 0)
// where bus_psum arrives on the psum data bus (psums of another input channel
// computed by another array, loop order IC) and buf is a small local psum
// buffer indexed by the drained row (psums of earlier channels, loop order
// OC). With store_local the sum is written back into buf. With out_en the
// sum goes on: relu, then downscaling from 32 to 8 bits (arithmetic right
// shift by `shift` and saturation to -128..127), then max pooling over `pool`
// consecutive results of this lane (groups restart with every tile, and an
// incomplete group at the tile's last row, idx = BUF_DEPTH-1, is dropped).
// The result leaves one cycle after the
// input (out_valid / out_data). There is no back-pressure: the array only
// feeds the ALU when its output buffer has room.
// The document gives the ALU's tasks (channel accumulation, relu, pooling,
// downscaling) but not its insides; the local buffer, the operation order
// and the 1-D pooling along a column are this design's choices.
module alu
  import acc_pkg::*;
#(
  parameter int BUF_DEPTH = 7
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  alu_op_t                    op,
  input  logic [$clog2(BUF_DEPTH)-1:0] idx,
  input  logic signed [PSUM_W-1:0]   pe_psum,
  input  logic signed [PSUM_W-1:0]   bus_psum,
  output logic                       out_valid,
  output logic signed [PSUM_W-1:0]   out_data
);
  logic signed [PSUM_W-1:0] lbuf [BUF_DEPTH];
  logic signed [PSUM_W-1:0] sum, act, scaled, pooled, pool_max;
  logic [2:0]               pool_cnt;
  logic                     pool_done;

  always_comb begin
    sum = pe_psum + (op.add_bus ? bus_psum : '0) + (op.add_local ? lbuf[idx] : '0);
    act = (op.relu && sum < 0) ? '0 : sum;
    scaled = act >>> op.shift;
    if (op.downscale) begin
      if (scaled > 127)       scaled = 127;
      else if (scaled < -128) scaled = -128;
    end else begin
      scaled = act;
    end
    pooled    = (op.pool > 3'd1 && pool_cnt != 0 && pool_max > scaled) ? pool_max : scaled;
    pool_done = (op.pool <= 3'd1) || (pool_cnt == op.pool - 3'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      pool_cnt  <= '0;
      pool_max  <= '0;
      for (int i = 0; i < BUF_DEPTH; i++) lbuf[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (op.store_local) lbuf[idx] <= sum;
        if (op.out_en) begin
          if (pool_done) begin
            out_valid <= 1'b1;
            out_data  <= pooled;
            pool_cnt  <= '0;
          end else if (int'(idx) == BUF_DEPTH - 1) begin
            // a group never spans two tiles: an incomplete one is dropped
            pool_cnt  <= '0;
          end else begin
            pool_max <= pooled;
            pool_cnt <= pool_cnt + 1'b1;
          end
        end
      end
    end
  end
endmodule
