// l2_rw_fsm: read & write FSM of the reconfigurable L2 SRAM.
// It generates the access patterns fed to the address generators. Both
// engines run independently and take a command {type, base, len, count,
// stride}: they visit offsets base + b*stride + i for b < count, i < len.
//   Read engine: one address per cycle (rd_addr_valid), rd_addr_last on the
//   final one; rd_busy until the command is done.
//   Write engine: one address per accepted write word; wr_ready tells the
//   source that a word is taken this cycle.
// A command is accepted when its engine is idle (rd_cmd_ready /
// wr_cmd_ready). Pattern shape and handshake are this design's; the document
// only says the FSM generates access patterns from the configuration.
module l2_rw_fsm
  import acc_pkg::*;
#(
  parameter int N_BLOCKS = 32,
  parameter int DEPTH    = 4096,
  localparam int OW = $clog2(N_BLOCKS * DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // read command
  input  logic          rd_cmd_valid,
  output logic          rd_cmd_ready,
  input  data_type_e    rd_cmd_type,
  input  logic [OW-1:0] rd_cmd_base,
  input  logic [OW-1:0] rd_cmd_len,
  input  logic [OW-1:0] rd_cmd_count,
  input  logic [OW-1:0] rd_cmd_stride,
  output logic          rd_addr_valid,
  output data_type_e    rd_addr_type,
  output logic [OW-1:0] rd_addr,
  output logic          rd_addr_last,
  // write command
  input  logic          wr_cmd_valid,
  output logic          wr_cmd_ready,
  input  data_type_e    wr_cmd_type,
  input  logic [OW-1:0] wr_cmd_base,
  input  logic [OW-1:0] wr_cmd_len,
  input  logic [OW-1:0] wr_cmd_count,
  input  logic [OW-1:0] wr_cmd_stride,
  input  logic          wr_data_valid,
  output logic          wr_ready,
  output data_type_e    wr_addr_type,
  output logic [OW-1:0] wr_addr
);
  typedef enum logic {IDLE, RUN} state_e;

  state_e        rs, ws;
  data_type_e    r_type, w_type;
  logic [OW-1:0] r_row, r_i, r_b, r_len, r_cnt, r_stride;
  logic [OW-1:0] w_row, w_i, w_b, w_len, w_cnt, w_stride;

  assign rd_cmd_ready  = (rs == IDLE);
  assign rd_addr_valid = (rs == RUN);
  assign rd_addr_type  = r_type;
  assign rd_addr       = r_row + r_i;
  assign rd_addr_last  = (rs == RUN) && (r_i == r_len - 1'b1) && (r_b == r_cnt - 1'b1);

  assign wr_cmd_ready  = (ws == IDLE);
  assign wr_ready      = (ws == RUN) && wr_data_valid;
  assign wr_addr_type  = w_type;
  assign wr_addr       = w_row + w_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= IDLE; r_type <= DT_FEATURE;
      r_row <= '0; r_i <= '0; r_b <= '0; r_len <= '0; r_cnt <= '0; r_stride <= '0;
    end else if (rs == IDLE) begin
      if (rd_cmd_valid && rd_cmd_len != 0 && rd_cmd_count != 0) begin
        rs <= RUN; r_type <= rd_cmd_type;
        r_row <= rd_cmd_base; r_i <= '0; r_b <= '0;
        r_len <= rd_cmd_len; r_cnt <= rd_cmd_count; r_stride <= rd_cmd_stride;
      end
    end else begin
      if (r_i == r_len - 1'b1) begin
        r_i <= '0;
        r_b <= r_b + 1'b1;
        r_row <= r_row + r_stride;
        if (r_b == r_cnt - 1'b1) rs <= IDLE;
      end else begin
        r_i <= r_i + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= IDLE; w_type <= DT_FEATURE;
      w_row <= '0; w_i <= '0; w_b <= '0; w_len <= '0; w_cnt <= '0; w_stride <= '0;
    end else if (ws == IDLE) begin
      if (wr_cmd_valid && wr_cmd_len != 0 && wr_cmd_count != 0) begin
        ws <= RUN; w_type <= wr_cmd_type;
        w_row <= wr_cmd_base; w_i <= '0; w_b <= '0;
        w_len <= wr_cmd_len; w_cnt <= wr_cmd_count; w_stride <= wr_cmd_stride;
      end
    end else if (wr_data_valid) begin
      if (w_i == w_len - 1'b1) begin
        w_i <= '0;
        w_b <= w_b + 1'b1;
        w_row <= w_row + w_stride;
        if (w_b == w_cnt - 1'b1) ws <= IDLE;
      end else begin
        w_i <= w_i + 1'b1;
      end
    end
  end
endmodule
