// accel_top: FPGA accelerator for 3D (and 2D) convolutional layers.
// N_ARRAYS PE arrays of RA x CA PEs each compute output tiles; a
// reconfigurable L2 SRAM of L2_BLOCKS blocks holds the input chunk, the
// filters and the psums of a layer with a per-layer split between them; a
// NoC moves words from the L2 to the arrays by unicast or broadcast and
// collects results; the controller runs tile jobs under loop order IC, OC
// or NP, and fully connected layers (input shared, weights per PE). Off-chip DRAM is outside: it fills the L2 through the fill_*
// ports and receives results from the out_* port.
// Use: write the L2 split (cfg_*), fill features and weights (fill_cmd_*
// then fill_*; offsets in 64-bit words inside the type's region), then
// start a job (job_valid / job). Results leave as rows of CA values
// tagged with the array number; a tile leaves row RA-1 first. job_done
// pulses when the arrays have stepped and drained the job's last pass; the
// results may still wait in the ALU path and output buffers.
// ev_* are one-cycle event strobes for the mechanisms of the design
// (temporal-buffer stall, output-drain stall, broadcast and unicast words,
// psum-bus transfers). Defaults are the evaluated configuration: 48 arrays
// of 7 x 7 PEs and 32 L2 blocks of eight 36Kb block RAMs.
module accel_top
  import acc_pkg::*;
#(
  parameter int N_ARRAYS    = 48,
  parameter int RA          = 7,
  parameter int CA          = 7,
  parameter int K_MAX       = 11,
  parameter int KT_MAX      = 3,
  parameter int L2_BLOCKS   = 32,
  parameter int BLOCK_DEPTH = 4096,
  localparam int BW = $clog2(L2_BLOCKS + 1),
  localparam int OW = $clog2(L2_BLOCKS * BLOCK_DEPTH),
  localparam int NW = (N_ARRAYS > 1) ? $clog2(N_ARRAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // L2 partition
  input  logic              cfg_we,
  input  data_type_e        cfg_type,
  input  logic [BW-1:0]     cfg_base,
  input  logic [BW-1:0]     cfg_num,
  // fill from DRAM
  input  logic              fill_cmd_valid,
  output logic              fill_cmd_ready,
  input  data_type_e        fill_cmd_type,
  input  logic [OW-1:0]     fill_cmd_base,
  input  logic [OW-1:0]     fill_cmd_len,
  input  logic              fill_valid,
  output logic              fill_ready,
  input  logic [WORD_W-1:0] fill_data,
  // job
  input  logic              job_valid,
  output logic              job_ready,
  input  job_t              job,
  output logic              job_done,
  // results to DRAM
  output logic              out_valid,
  input  logic              out_ready,
  output logic [NW-1:0]     out_array,
  output logic [PSUM_W-1:0] out_data [CA],
  // status and events
  output logic              l2_err,
  output logic              l2_overlap,
  output logic              ev_stall_temporal,
  output logic              ev_stall_output,
  output logic              ev_bcast,
  output logic              ev_ucast,
  output logic              ev_bus
);
  // ---------------- L2 ----------------
  logic              rd_cmd_valid, rd_cmd_ready, rd_valid, rd_last, rd_busy;
  data_type_e        rd_cmd_type;
  logic [OW-1:0]     rd_cmd_base, rd_cmd_len;
  logic [WORD_W-1:0] rd_data;

  l2_sram #(.N_BLOCKS(L2_BLOCKS), .DEPTH(BLOCK_DEPTH)) u_l2 (
    .clk, .rst_n,
    .cfg_we, .cfg_type, .cfg_base, .cfg_num,
    .wr_cmd_valid(fill_cmd_valid), .wr_cmd_ready(fill_cmd_ready),
    .wr_cmd_type(fill_cmd_type), .wr_cmd_base(fill_cmd_base), .wr_cmd_len(fill_cmd_len),
    .wr_cmd_count(OW'(1)), .wr_cmd_stride('0),
    .wr_valid(fill_valid), .wr_ready(fill_ready), .wr_data(fill_data),
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_type, .rd_cmd_base, .rd_cmd_len,
    .rd_cmd_count(OW'(1)), .rd_cmd_stride('0),
    .rd_valid, .rd_data, .rd_last, .rd_busy,
    .err(l2_err), .cfg_overlap(l2_overlap)
  );

  // ---------------- controller ----------------
  logic [N_ARRAYS-1:0] dest_mask, ld_desc_valid, pass_start, route_dram;
  logic [N_ARRAYS-1:0] arr_pass_busy, arr_busy, arr_idle;
  load_desc_t          ld_desc;
  ksize_t              pass_k;
  logic                pass_first, pass_last;
  alu_op_t             pass_op [N_ARRAYS];

  controller #(.N(N_ARRAYS), .RA(RA), .CA(CA), .N_BLOCKS(L2_BLOCKS), .DEPTH(BLOCK_DEPTH)) u_ctrl (
    .clk, .rst_n,
    .job_valid, .job_ready, .job, .done(job_done),
    .rd_cmd_valid, .rd_cmd_ready, .rd_cmd_type, .rd_cmd_base, .rd_cmd_len, .rd_busy,
    .dest_mask, .ld_desc_valid, .ld_desc,
    .pass_start, .pass_k, .pass_first, .pass_last, .pass_op, .route_dram,
    .arr_pass_busy, .arr_busy, .arr_idle
  );

  // ---------------- NoC ----------------
  logic [N_ARRAYS-1:0] ld_valid, arr_out_valid, arr_out_ready, bus_valid, bus_ready;
  logic [WORD_W-1:0]   ld_data;
  logic                is_bcast;
  logic [PSUM_W-1:0]   arr_out_data [N_ARRAYS][CA];
  logic [PSUM_W-1:0]   bus_data [N_ARRAYS][CA];

  noc #(.N(N_ARRAYS), .CA(CA)) u_noc (
    .clk, .rst_n,
    .dest_mask, .in_valid(rd_valid), .in_data(rd_data),
    .ld_valid, .ld_data, .is_bcast,
    .route_dram, .arr_out_valid, .arr_out_ready, .arr_out_data,
    .bus_valid, .bus_ready, .bus_data,
    .out_valid, .out_ready, .out_array, .out_data
  );

  // ---------------- PE arrays ----------------
  logic [N_ARRAYS-1:0] st_t, st_o;

  for (genvar n = 0; n < N_ARRAYS; n++) begin : g_arr
    pe_array #(.RA(RA), .CA(CA), .K_MAX(K_MAX), .KT_MAX(KT_MAX)) u_arr (
      .clk, .rst_n,
      .ld_desc_valid(ld_desc_valid[n]), .ld_desc,
      .ld_valid(ld_valid[n]), .ld_data,
      .pass_start(pass_start[n]), .pass_k, .pass_first, .pass_last,
      .pass_op(pass_op[n]),
      .busy(arr_busy[n]), .idle(arr_idle[n]), .pass_busy(arr_pass_busy[n]),
      .bus_valid(bus_valid[n]), .bus_ready(bus_ready[n]), .bus_data(bus_data[n]),
      .out_valid(arr_out_valid[n]), .out_ready(arr_out_ready[n]), .out_data(arr_out_data[n]),
      .stall_temporal(st_t[n]), .stall_output(st_o[n])
    );
  end

  assign ev_stall_temporal = |st_t;
  assign ev_stall_output   = |st_o;
  assign ev_bcast          = is_bcast;
  assign ev_ucast          = |ld_valid && !is_bcast;
  assign ev_bus            = |(bus_valid & bus_ready);

  logic unused_ok;
  assign unused_ok = rd_last;
endmodule
