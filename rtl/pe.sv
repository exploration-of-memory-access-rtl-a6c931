// pe: one processing element of a PE array.
// It multiplies the shared input (the weight broadcast to the whole array)
// with an operand chosen by a mux from three buffers and accumulates the
// products. The operand comes from
//   - the temporal buffer (a small FIFO filled ahead of time with the first
//     input pixel of each kernel plane, so loading overlaps computing),
//   - row_in: the row buffer of the neighbour along the row (or fresh data at
//     the array edge) when the kernel steps one column,
//   - col_in: the column buffer of the neighbour along the column (or fresh
//     data at the edge) when the kernel steps one row.
// The row buffer always keeps the last operand; the column buffer keeps the
// operand used at the start of the current kernel row. Together they give the
// sliding-window reuse between neighbouring PEs.
// Timing: one step per cycle (step_valid). step_first clears the accumulator
// with the product of that step; step_last copies the final sum into the
// output register. Output registers form a chain along the column: with
// out_shift they load out_in (the register of the PE above), so a column
// drains in Ra cycles while the next tile is already accumulating.
// The buffer set, mux, MAC and cascaded output register follow the document;
// buffer depths, signed arithmetic and the step encoding are this design's.
module pe
  import acc_pkg::*;
#(
  parameter int TBUF_DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // step control (shared by the array)
  input  logic                     step_valid,
  input  operand_src_e             step_src,
  input  logic                     step_first,
  input  logic                     step_last,
  input  logic signed [DATA_W-1:0] weight,
  // neighbour / edge operands
  input  logic        [DATA_W-1:0] row_in,
  input  logic        [DATA_W-1:0] col_in,
  output logic        [DATA_W-1:0] row_out,
  output logic        [DATA_W-1:0] col_out,
  // temporal buffer fill
  input  logic                     tload_valid,
  input  logic        [DATA_W-1:0] tload_data,
  // output register chain
  input  logic                     out_shift,
  input  logic signed [PSUM_W-1:0] out_in,
  output logic signed [PSUM_W-1:0] out_out
);
  localparam int PW = $clog2(TBUF_DEPTH);

  logic [DATA_W-1:0] tbuf [TBUF_DEPTH];
  logic [PW-1:0]     t_wp, t_rp;
  logic [PW:0]       t_cnt;

  logic [DATA_W-1:0]        row_buf, col_buf, operand;
  logic signed [PSUM_W-1:0] acc, acc_next, product;
  logic                     t_pop;

  always_comb begin
    unique case (step_src)
      SRC_TEMPORAL: operand = tbuf[t_rp];
      SRC_ROW:      operand = row_in;
      default:      operand = col_in;
    endcase
    product  = PSUM_W'($signed(operand) * weight);
    acc_next = (step_first ? '0 : acc) + product;
    t_pop    = step_valid && (step_src == SRC_TEMPORAL);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_wp    <= '0;
      t_rp    <= '0;
      t_cnt   <= '0;
      row_buf <= '0;
      col_buf <= '0;
      acc     <= '0;
      out_out <= '0;
      for (int i = 0; i < TBUF_DEPTH; i++) tbuf[i] <= '0;
    end else begin
      if (tload_valid) begin
        tbuf[t_wp] <= tload_data;
        t_wp       <= (int'(t_wp) == TBUF_DEPTH-1) ? '0 : t_wp + 1'b1;
      end
      if (t_pop) t_rp <= (int'(t_rp) == TBUF_DEPTH-1) ? '0 : t_rp + 1'b1;
      t_cnt <= t_cnt + (PW+1)'(tload_valid) - (PW+1)'(t_pop);
      if (step_valid) begin
        row_buf <= operand;
        if (step_src != SRC_ROW) col_buf <= operand;
        acc <= acc_next;
      end
      if (step_valid && step_last) out_out <= acc_next;
      else if (out_shift)          out_out <= out_in;
    end
  end

  assign row_out = row_buf;
  assign col_out = col_buf;

  // a pop needs data, a push needs room, a new result must not meet a drain
  a_tbuf_under: assert property (@(posedge clk) disable iff (!rst_n) t_pop |-> (t_cnt != 0));
  a_tbuf_over:  assert property (@(posedge clk) disable iff (!rst_n)
                  tload_valid && !t_pop |-> (int'(t_cnt) < TBUF_DEPTH));
  a_out_clash:  assert property (@(posedge clk) disable iff (!rst_n) !(step_valid && step_last && out_shift));
endmodule
