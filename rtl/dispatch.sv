// dispatch: weight & feature dispatch of one PE array.
// Loading: a stream of 64-bit words from the NoC is unpacked byte by byte
// under a load descriptor (load_desc_t). The descriptor skips the leading
// bytes of the first word, keeps `nbytes` bytes, splits them into rows of
// `row_len` bytes, keeps columns col0 .. col0+ncols-1 of each row and writes
// them into a 3-D box starting at plane `plane0`, `rows` rows per plane.
// Target TGT_WINDOW is the input window of the current output tile
// ((Ra+R-1) x (Ca+S-1) pixels for each of T planes); TGT_WEIGHT is the
// T x R x S filter of the current (filter, channel) pair. Up to 8 bytes are
// stored per cycle; ld_valid words are always accepted.
// Pass: after pass_start the unit walks (t, r, s) over the kernel and issues
// one step per cycle to the PE grid:
//   - step_weight: filter[t][r][s], broadcast to every PE (shared data),
//   - step_src: TEMPORAL at r = s = 0, COLUMN at s = 0, ROW otherwise,
//   - edge: the fresh pixels that enter the grid at its edge (row/column
//     selection): for ROW steps lane i = window[t][i+r][Ca-1+s] for the last
//     column, for COLUMN steps lane j = window[t][Ra-1+r][j] for the last row.
// In parallel the temporal loader writes the first pixel of each kernel plane
// into the PEs' temporal buffers, one PE row (Ca bytes) per cycle, running up
// to TBUF_DEPTH planes ahead, so that with R*S >= Ra the loading of plane t+1
// is hidden behind the steps of plane t and a pass takes Ra + T*R*S cycles.
// A step waits (stall_temporal) when its plane is not loaded yet, and the last
// step of a result waits (stall_output) while last_ok is low, i.e. while the
// output registers are still draining the previous result.
// The document names the dispatch, the shared data and the row/column
// selection; the window store, the load descriptor and this schedule are
// this design's.
module dispatch
  import acc_pkg::*;
#(
  parameter int RA         = 7,
  parameter int CA         = 7,
  parameter int K_MAX      = 11,  // largest R and S
  parameter int KT_MAX     = 3,   // largest T
  parameter int TBUF_DEPTH = 4,
  localparam int EL = (RA > CA) ? RA : CA,
  localparam int WH = RA + K_MAX - 1,
  localparam int WW = CA + K_MAX - 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // load side
  input  logic               ld_desc_valid,
  input  load_desc_t         ld_desc,
  input  logic               ld_valid,
  input  logic [WORD_W-1:0]  ld_data,
  output logic               ld_busy,
  // pass control
  input  logic               pass_start,
  input  ksize_t             pass_k,
  input  logic               pass_first,
  input  logic               pass_last,
  input  alu_op_t            pass_op,
  output logic               pass_busy,
  input  logic               last_ok,
  // to the PE grid
  output logic               step_valid,
  output operand_src_e       step_src,
  output logic               step_first,
  output logic               step_last,
  output logic [DATA_W-1:0]  step_weight,
  output alu_op_t            step_op,
  output logic [DATA_W-1:0]  edge_data [EL],
  output logic               tload_valid,
  output logic [$clog2(RA)-1:0] tload_row,
  output logic [DATA_W-1:0]  tload_data [CA],
  // events
  output logic               stall_temporal,
  output logic               stall_output
);
  logic [DATA_W-1:0] win [KT_MAX][WH][WW];
  logic [DATA_W-1:0] wgt [KT_MAX][K_MAX][K_MAX];

  // ---------------- loader ----------------
  load_desc_t  d;
  logic [15:0] l_pos, l_kept, l_col;
  logic [7:0]  l_row;
  logic [3:0]  l_plane;

  assign ld_busy = (l_kept < d.nbytes);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d       <= '0;
      l_pos   <= '0;
      l_kept  <= '0;
      l_col   <= '0;
      l_row   <= '0;
      l_plane <= '0;
      for (int a = 0; a < KT_MAX; a++) begin
        for (int b = 0; b < WH; b++)
          for (int c = 0; c < WW; c++) win[a][b][c] <= '0;
        for (int b = 0; b < K_MAX; b++)
          for (int c = 0; c < K_MAX; c++) wgt[a][b][c] <= '0;
      end
    end else if (ld_desc_valid) begin
      d       <= ld_desc;
      l_pos   <= '0;
      l_kept  <= '0;
      l_col   <= '0;
      l_row   <= '0;
      l_plane <= ld_desc.plane0;
    end else if (ld_valid) begin
      logic [15:0] pos, kept, col, cc;
      logic [7:0]  row;
      logic [3:0]  pl;
      pos = l_pos; kept = l_kept; col = l_col; row = l_row; pl = l_plane;
      for (int b = 0; b < BYTES_PER_WORD; b++) begin
        if (pos >= 16'(d.skip) && kept < d.nbytes) begin
          cc = col - d.col0;
          if (col >= d.col0 && cc < 16'(d.ncols) && int'(pl) < KT_MAX) begin
            if (d.tgt == TGT_WINDOW) begin
              if (int'(row) < WH && int'(cc) < WW)
                win[pl][row][cc] <= ld_data[b*DATA_W +: DATA_W];
            end else begin
              if (int'(row) < K_MAX && int'(cc) < K_MAX)
                wgt[pl][row][cc] <= ld_data[b*DATA_W +: DATA_W];
            end
          end
          kept = kept + 1'b1;
          if (col == d.row_len - 1'b1) begin
            col = '0;
            if (row == d.rows - 1'b1) begin
              row = '0;
              pl  = pl + 1'b1;
            end else begin
              row = row + 1'b1;
            end
          end else begin
            col = col + 1'b1;
          end
        end
        pos = pos + 1'b1;
      end
      l_pos <= pos; l_kept <= kept; l_col <= col; l_row <= row; l_plane <= pl;
    end
  end

  // ---------------- pass sequencing ----------------
  ksize_t     k;
  logic       p_first, p_last;
  alu_op_t    p_op;
  logic [3:0] t, r, s;        // step counters
  logic [3:0] lt;             // planes completely loaded into temporal buffers
  logic [3:0] used;           // planes consumed
  logic [$clog2(RA)-1:0] li;  // PE row being loaded
  logic       active;

  logic is_first, is_last, plane_start, can_step, can_load;

  always_comb begin
    plane_start = (r == 0) && (s == 0);
    is_first    = (t == 0) && plane_start;
    is_last     = (t == k.t - 1'b1) && (r == k.r - 1'b1) && (s == k.s - 1'b1);
    can_load    = active && (lt < k.t) && (int'(lt - used) < TBUF_DEPTH);
    can_step    = active && !(plane_start && t >= lt) && !(p_last && is_last && !last_ok);
    stall_temporal = active && plane_start && (t >= lt);
    stall_output   = active && !stall_temporal && p_last && is_last && !last_ok;
  end

  assign pass_busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; p_first <= 1'b0; p_last <= 1'b0; p_op <= '0;
      t <= '0; r <= '0; s <= '0; lt <= '0; used <= '0; li <= '0;
      active <= 1'b0;
    end else if (pass_start && !active) begin
      k <= pass_k; p_first <= pass_first; p_last <= pass_last; p_op <= pass_op;
      t <= '0; r <= '0; s <= '0; lt <= '0; used <= '0; li <= '0;
      active <= 1'b1;
    end else begin
      if (can_load) begin
        if (int'(li) == RA-1) begin
          li <= '0;
          lt <= lt + 1'b1;
        end else begin
          li <= li + 1'b1;
        end
      end
      if (can_step) begin
        if (plane_start) used <= used + 1'b1;
        if (is_last) active <= 1'b0;
        if (s == k.s - 1'b1) begin
          s <= '0;
          if (r == k.r - 1'b1) begin
            r <= '0;
            t <= t + 1'b1;
          end else begin
            r <= r + 1'b1;
          end
        end else begin
          s <= s + 1'b1;
        end
      end
    end
  end

  // ---------------- step outputs ----------------
  always_comb begin
    step_valid  = can_step;
    step_src    = plane_start ? SRC_TEMPORAL : ((s == 0) ? SRC_COLUMN : SRC_ROW);
    step_first  = p_first && is_first;
    step_last   = p_last && is_last;
    step_op     = p_op;
    step_weight = wgt[t][r][s];
    for (int e = 0; e < EL; e++) begin
      edge_data[e] = '0;
      if (step_src == SRC_ROW && e < RA)
        edge_data[e] = win[t][e + int'(r)][CA - 1 + int'(s)];
      else if (step_src == SRC_COLUMN && e < CA)
        edge_data[e] = win[t][RA - 1 + int'(r)][e];
    end
    tload_valid = can_load;
    tload_row   = li;
    for (int j = 0; j < CA; j++) tload_data[j] = win[lt][li][j];
  end

  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n) !(pass_start && active));
endmodule
