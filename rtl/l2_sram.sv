// l2_sram: reconfigurable last-level on-chip SRAM.
// N_BLOCKS blocks of DEPTH x WORD_W words are shared by the three data types
// (input features, weights, psums). The configuration registers give each
// type a contiguous range of blocks, set per layer so that the split can
// follow the layer's needs. The read & write FSM turns commands into offset
// streams, and one address generator per side maps {type, offset} to
// {block, row}.
//   Write side: a command (wr_cmd_*) followed by a word stream (wr_valid /
//   wr_ready / wr_data) coming from off-chip or from the PE arrays.
//   Read side: a command (rd_cmd_*) produces one word per cycle on
//   rd_valid / rd_data, one cycle after its address, with rd_last on the
//   final word; the stream goes to the NoC and has no back-pressure.
// An access outside the type's range is dropped and raises err (sticky
// until reset). Structure follows the document; word width, depth,
// command format and error handling are this design's.
module l2_sram
  import acc_pkg::*;
#(
  parameter int N_BLOCKS = 32,
  parameter int DEPTH    = 4096,
  localparam int BW = $clog2(N_BLOCKS + 1),
  localparam int OW = $clog2(N_BLOCKS * DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration registers
  input  logic              cfg_we,
  input  data_type_e        cfg_type,
  input  logic [BW-1:0]     cfg_base,
  input  logic [BW-1:0]     cfg_num,
  // write command and data
  input  logic              wr_cmd_valid,
  output logic              wr_cmd_ready,
  input  data_type_e        wr_cmd_type,
  input  logic [OW-1:0]     wr_cmd_base,
  input  logic [OW-1:0]     wr_cmd_len,
  input  logic [OW-1:0]     wr_cmd_count,
  input  logic [OW-1:0]     wr_cmd_stride,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [WORD_W-1:0] wr_data,
  // read command and data
  input  logic              rd_cmd_valid,
  output logic              rd_cmd_ready,
  input  data_type_e        rd_cmd_type,
  input  logic [OW-1:0]     rd_cmd_base,
  input  logic [OW-1:0]     rd_cmd_len,
  input  logic [OW-1:0]     rd_cmd_count,
  input  logic [OW-1:0]     rd_cmd_stride,
  output logic              rd_valid,
  output logic [WORD_W-1:0] rd_data,
  output logic              rd_last,
  output logic              rd_busy,
  output logic              err,
  output logic              cfg_overlap
);
  localparam int RW = $clog2(DEPTH);

  logic [BW-1:0] base [N_DTYPES];
  logic [BW-1:0] num  [N_DTYPES];

  l2_config_regs #(.N_BLOCKS(N_BLOCKS)) u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_type, .cfg_base, .cfg_num,
    .base, .num, .overlap(cfg_overlap)
  );

  logic          ra_valid, ra_last;
  data_type_e    ra_type, wa_type;
  logic [OW-1:0] ra, wa;

  l2_rw_fsm #(.N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH)) u_fsm (
    .clk, .rst_n,
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_type, .rd_cmd_base, .rd_cmd_len,
    .rd_cmd_count, .rd_cmd_stride,
    .rd_addr_valid(ra_valid), .rd_addr_type(ra_type), .rd_addr(ra), .rd_addr_last(ra_last),
    .wr_cmd_valid, .wr_cmd_ready, .wr_cmd_type, .wr_cmd_base, .wr_cmd_len,
    .wr_cmd_count, .wr_cmd_stride,
    .wr_data_valid(wr_valid), .wr_ready, .wr_addr_type(wa_type), .wr_addr(wa)
  );

  logic [BW-1:0] rblk, wblk, rblk_q;
  logic [RW-1:0] rrow, wrow;
  logic          rerr, werr;

  l2_addr_gen #(.N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH)) u_rag (
    .dtype(ra_type), .offset(ra), .base, .num, .block(rblk), .row(rrow), .err(rerr)
  );
  l2_addr_gen #(.N_BLOCKS(N_BLOCKS), .DEPTH(DEPTH)) u_wag (
    .dtype(wa_type), .offset(wa), .base, .num, .block(wblk), .row(wrow), .err(werr)
  );

  logic [WORD_W-1:0] bdata [N_BLOCKS];

  for (genvar b = 0; b < N_BLOCKS; b++) begin : g_blk
    block_sram #(.DEPTH(DEPTH), .WIDTH(WORD_W)) u_blk (
      .clk,
      .we   (wr_ready && !werr && int'(wblk) == b),
      .waddr(wrow),
      .wdata(wr_data),
      .re   (ra_valid && !rerr && int'(rblk) == b),
      .raddr(rrow),
      .rdata(bdata[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      rblk_q   <= '0;
      err      <= 1'b0;
    end else begin
      rd_valid <= ra_valid;
      rd_last  <= ra_last;
      rblk_q   <= rblk;
      if ((ra_valid && rerr) || (wr_ready && werr)) err <= 1'b1;
    end
  end

  assign rd_data = (int'(rblk_q) < N_BLOCKS) ? bdata[rblk_q] : '0;
  assign rd_busy = ra_valid || rd_valid;
endmodule
