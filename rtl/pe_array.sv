// pe_array: one PE array of the accelerator.
// Ra x Ca PEs compute an Ra x Ca tile of outputs (one output plane) at once.
// The dispatch unit holds the input window and the filter and issues one
// kernel step per cycle; every PE gets the same weight, and input pixels
// move between neighbouring PEs like a sliding window: along a row when the
// kernel steps one column (PE (i,j) takes the row buffer of PE (i,j+1)) and
// along a column when the kernel steps one row (PE (i,j) takes the column
// buffer of PE (i+1,j)). Fresh pixels enter at the last column / last row
// through the row/column selection; the first pixel of each kernel plane
// comes from the PE's temporal buffer. So PE (i,j) computes the output at
// tile position (i,j).
// When a result is complete the output registers drain down the columns,
// one PE row per cycle starting with row Ra-1, into the "To Psum/ALU" FIFO
// (the ALU operation travels with each row). Ca ALUs then add psums from the
// psum bus or from their local buffer, apply relu / downscaling / pooling and
// write rows of Ca results into the output buffer.
// Interfaces: ld_* loads the dispatch stores, pass_* runs a pass of T*R*S
// steps, bus_* is the incoming psum bus (valid/ready, Ca lanes), out_* the
// output buffer (valid/ready, Ca lanes). busy is high while the array is
// loading, stepping or draining its PE grid; idle when, in addition, no
// result waits in the ALU path or the output buffer.
// A fully connected layer uses the same grid with 1 x 1 x T passes: the
// shared input arrives as the weight, and each PE's own weights arrive as
// the "planes" of its temporal buffer, so every step is a temporal step.
// Timing: a pass takes Ra + T*R*S cycles when R*S >= Ra; the drain of Ra
// rows overlaps with the next pass. Structure follows the document; queue
// depths and handshakes are this design's.
module pe_array
  import acc_pkg::*;
#(
  parameter int RA         = 7,
  parameter int CA         = 7,
  parameter int K_MAX      = 11,
  parameter int KT_MAX     = 3,
  parameter int TBUF_DEPTH = 4,
  parameter int OBUF_DEPTH = 16,
  localparam int EL = (RA > CA) ? RA : CA
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_desc_valid,
  input  load_desc_t        ld_desc,
  input  logic              ld_valid,
  input  logic [WORD_W-1:0] ld_data,
  input  logic              pass_start,
  input  ksize_t            pass_k,
  input  logic              pass_first,
  input  logic              pass_last,
  input  alu_op_t           pass_op,
  output logic              busy,
  output logic              idle,
  output logic              pass_busy,
  // psum bus in
  input  logic              bus_valid,
  output logic              bus_ready,
  input  logic [PSUM_W-1:0] bus_data [CA],
  // output buffer
  output logic              out_valid,
  input  logic              out_ready,
  output logic [PSUM_W-1:0] out_data [CA],
  // events
  output logic              stall_temporal,
  output logic              stall_output
);
  localparam int RW = (RA > 1) ? $clog2(RA) : 1;
  localparam int QD = 2 * RA;
  localparam int QW = $bits(alu_op_t) + RW + CA * PSUM_W;

  // ---------------- dispatch ----------------
  logic               step_valid, step_first, step_last, tload_valid, ld_busy, last_ok;
  operand_src_e       step_src;
  logic [DATA_W-1:0]  step_weight;
  alu_op_t            step_op;
  logic [DATA_W-1:0]  edge_data [EL];
  logic [$clog2(RA)-1:0] tload_row;
  logic [DATA_W-1:0]  tload_data [CA];

  dispatch #(.RA(RA), .CA(CA), .K_MAX(K_MAX), .KT_MAX(KT_MAX), .TBUF_DEPTH(TBUF_DEPTH)) u_disp (
    .clk, .rst_n,
    .ld_desc_valid, .ld_desc, .ld_valid, .ld_data, .ld_busy,
    .pass_start, .pass_k, .pass_first, .pass_last, .pass_op, .pass_busy, .last_ok,
    .step_valid, .step_src, .step_first, .step_last, .step_weight, .step_op,
    .edge_data, .tload_valid, .tload_row, .tload_data,
    .stall_temporal, .stall_output
  );

  // ---------------- PE grid ----------------
  logic [DATA_W-1:0]        row_o [RA][CA];
  logic [DATA_W-1:0]        col_o [RA][CA];
  logic signed [PSUM_W-1:0] out_o [RA][CA];
  logic [RW:0]              drain_cnt;
  logic                     out_shift;

  assign out_shift = (drain_cnt != 0);

  for (genvar i = 0; i < RA; i++) begin : g_row
    for (genvar j = 0; j < CA; j++) begin : g_col
      logic [DATA_W-1:0]        row_in, col_in;
      logic signed [PSUM_W-1:0] out_in;
      // row/column selection: fresh pixels at the last column / last row
      assign row_in = (j == CA-1) ? edge_data[i] : row_o[i][j+1];
      assign col_in = (i == RA-1) ? edge_data[j] : col_o[i+1][j];
      assign out_in = (i == 0) ? '0 : out_o[i-1][j];
      pe #(.TBUF_DEPTH(TBUF_DEPTH)) u_pe (
        .clk, .rst_n,
        .step_valid, .step_src, .step_first, .step_last,
        .weight     ($signed(step_weight)),
        .row_in, .col_in,
        .row_out    (row_o[i][j]),
        .col_out    (col_o[i][j]),
        .tload_valid(tload_valid && (int'(tload_row) == i)),
        .tload_data (tload_data[j]),
        .out_shift,
        .out_in,
        .out_out    (out_o[i][j])
      );
    end
  end

  // ---------------- drain into "To Psum/ALU" ----------------
  alu_op_t         drain_op;
  logic [QW-1:0]   q_in, q_out;
  logic            q_in_ready, q_out_valid, q_out_ready;
  logic [$clog2(QD+1)-1:0] q_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drain_cnt <= '0;
      drain_op  <= '0;
    end else if (step_valid && step_last) begin
      drain_cnt <= (RW+1)'(RA);
      drain_op  <= step_op;
    end else if (drain_cnt != 0) begin
      drain_cnt <= drain_cnt - 1'b1;
    end
  end

  always_comb begin
    q_in = '0;
    q_in[QW-1 -: $bits(alu_op_t)] = drain_op;
    q_in[CA*PSUM_W +: RW] = RW'(RA - int'(drain_cnt));
    for (int j = 0; j < CA; j++) q_in[j*PSUM_W +: PSUM_W] = out_o[RA-1][j];
  end

  // a new result may be latched only when no drain is running and the
  // queue can take all Ra rows of it
  assign last_ok = (drain_cnt == 0) && (int'(q_count) <= QD - RA);

  sync_fifo #(.WIDTH(QW), .DEPTH(QD)) u_to_alu (
    .clk, .rst_n,
    .in_valid(out_shift), .in_ready(q_in_ready), .in_data(q_in),
    .out_valid(q_out_valid), .out_ready(q_out_ready), .out_data(q_out),
    .count(q_count)
  );

  // ---------------- ALUs ----------------
  alu_op_t                  a_op;
  logic [RW-1:0]            a_idx;
  logic                     a_fire, ob_room;
  logic                     a_valid [CA];
  logic signed [PSUM_W-1:0] a_out [CA];
  logic [$clog2(OBUF_DEPTH+1)-1:0] ob_count;
  logic                     ob_in_ready;
  logic [CA*PSUM_W-1:0]     ob_in, ob_out;

  assign a_op  = q_out[QW-1 -: $bits(alu_op_t)];
  assign a_idx = q_out[CA*PSUM_W +: RW];
  // one slot is kept free for the result still inside the ALU
  assign ob_room     = int'(ob_count) < OBUF_DEPTH - 1;
  assign a_fire      = q_out_valid && ob_room && (!a_op.add_bus || bus_valid);
  assign q_out_ready = a_fire;
  assign bus_ready   = a_fire && a_op.add_bus;

  for (genvar j = 0; j < CA; j++) begin : g_alu
    alu #(.BUF_DEPTH(RA)) u_alu (
      .clk, .rst_n,
      .in_valid (a_fire),
      .op       (a_op),
      .idx      (a_idx),
      .pe_psum  ($signed(q_out[j*PSUM_W +: PSUM_W])),
      .bus_psum ($signed(bus_data[j])),
      .out_valid(a_valid[j]),
      .out_data (a_out[j])
    );
    assign ob_in[j*PSUM_W +: PSUM_W] = a_out[j];
    assign out_data[j] = ob_out[j*PSUM_W +: PSUM_W];
  end

  // ---------------- output buffer ----------------
  sync_fifo #(.WIDTH(CA*PSUM_W), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk, .rst_n,
    .in_valid(a_valid[0]), .in_ready(ob_in_ready), .in_data(ob_in),
    .out_valid, .out_ready, .out_data(ob_out),
    .count(ob_count)
  );

  // busy covers loading, stepping and draining; results already queued for
  // the ALUs or the output buffer do not keep the array busy
  assign busy = pass_busy || ld_busy || out_shift;
  assign idle = !busy && !q_out_valid && !a_valid[0] && !out_valid;

  a_q_room:  assert property (@(posedge clk) disable iff (!rst_n) out_shift |-> q_in_ready);
  a_ob_room: assert property (@(posedge clk) disable iff (!rst_n) a_valid[0] |-> ob_in_ready);
endmodule
