// controller: runs one tile job (an Ra x Ca output tile of one output plane)
// under the loop order chosen for the layer.
// Data layout in the L2 (bytes, region-relative): input features of the
// chunk as [c][d][h][w] (each channel's H x W x D chunk is contiguous),
// weights as [m][c][t][r][s]. For every kernel plane t the controller reads
// the rows h0 .. h0+Ra+R-2 of input plane d0+t as one contiguous burst and
// tells the receiving dispatch units which columns to keep; a filter
// (m, c) is one contiguous burst of T*R*S bytes.
//   NP: for each channel c the window is broadcast to the n_arr arrays and
//       array n gets filter m0+n (unicast). The MACs accumulate over all
//       channels (first pass clears, last pass latches); no psum leaves a PE.
//   OC: same traffic, but every channel is a pass of its own; the ALUs add
//       each channel's psums into their local psum buffer.
//   IC: n_arr arrays each take their own input channel (unicast window and
//       filter m0); their psums are summed along the psum bus chain, array
//       n-1 -> n, and the last array accumulates groups of n_arr channels
//       in its local buffer. chans must be a multiple of n_arr.
//   FC: a fully connected layer. The input vector is shared by every PE and
//       every array: slice c of T inputs is broadcast into the filter store.
//       Each PE gets its own weight through its temporal buffer: array n
//       receives, unicast, the T planes of RA x CA weights of neurons
//       (m0+n)*RA*CA .. for those inputs. Passes are 1 x 1 x T and
//       accumulate in the MACs as under NP. Here the feature region holds
//       the input vector and the weight region the matrix [m][k][RA][CA];
//       c_total is the number of inputs and chans = c_total / T.
// Per array the controller gives the ALU operation of each pass and whether
// its output goes to DRAM or onto the psum bus. done pulses when every array
// has finished stepping and draining the last pass; its results may still
// be queued in the ALU path and output buffers.
// The three orders and what they share, broadcast or accumulate follow the
// document (Algorithm 1, Fig. 4), as does FC sharing the input and sending
// weights individually; the job format, the memory layout and the exact
// schedule are this design's.
module controller
  import acc_pkg::*;
#(
  parameter int N        = 48,
  parameter int RA       = 7,
  parameter int CA       = 7,
  parameter int N_BLOCKS = 32,
  parameter int DEPTH    = 4096,
  localparam int OW = $clog2(N_BLOCKS * DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          job_valid,
  output logic          job_ready,
  input  job_t          job,
  output logic          done,
  // L2 read command
  output logic          rd_cmd_valid,
  input  logic          rd_cmd_ready,
  output data_type_e    rd_cmd_type,
  output logic [OW-1:0] rd_cmd_base,
  output logic [OW-1:0] rd_cmd_len,
  input  logic          rd_busy,
  // NoC and arrays
  output logic [N-1:0]  dest_mask,
  output logic [N-1:0]  ld_desc_valid,
  output load_desc_t    ld_desc,
  output logic [N-1:0]  pass_start,
  output ksize_t        pass_k,
  output logic          pass_first,
  output logic          pass_last,
  output alu_op_t       pass_op [N],
  output logic [N-1:0]  route_dram,
  input  logic [N-1:0]  arr_pass_busy,
  input  logic [N-1:0]  arr_busy,
  input  logic [N-1:0]  arr_idle
);
  typedef enum logic [2:0] {S_IDLE, S_ROUTE, S_DESC, S_READ, S_WAIT_RD, S_PASS, S_WAIT_PASS, S_DRAIN} state_e;

  state_e     st;
  job_t       j;
  logic       is_wgt;      // current load: window (0) or filter (1)
  logic [13:0] c;          // channel (OC/NP), group (IC) or input slice (FC)
  logic [9:0]  n;          // array
  logic [3:0] t;
  logic [N-1:0] used;
  logic [13:0] groups;

  // current channel for loads
  logic [13:0] cur_ch;
  logic [9:0]  cur_m;
  logic [N-1:0] route_new;
  int unsigned start_byte, nbytes, skip;

  always_comb begin
    groups = (j.order == ORDER_IC) ? 14'(j.chans / ((j.n_arr == 0) ? 14'd1 : 14'(j.n_arr))) : j.chans;
    cur_ch = (j.order == ORDER_IC) ? 14'(c * 14'(j.n_arr) + 14'(n)) : c;
    cur_m  = (j.order == ORDER_IC) ? j.m0 : 10'(j.m0 + n);
    if (j.order == ORDER_FC) begin
      // window store <- RA x CA weights of input k = c*T + t (unicast),
      // filter store <- inputs c*T .. c*T+T-1 (broadcast)
      if (!is_wgt) begin
        nbytes     = RA * CA;
        start_byte = (int'(cur_m) * int'(j.c_total) + int'(c) * int'(j.k.t) + int'(t)) * nbytes;
      end else begin
        nbytes     = int'(j.k.t);
        start_byte = int'(c) * nbytes;
      end
    end else if (!is_wgt) begin
      start_byte = ((int'(cur_ch) * int'(j.d) + int'(j.d0) + int'(t)) * int'(j.h) + int'(j.h0)) * int'(j.w);
      nbytes     = (RA + int'(j.k.r) - 1) * int'(j.w);
    end else begin
      nbytes     = int'(j.k.t) * int'(j.k.r) * int'(j.k.s);
      start_byte = (int'(cur_m) * int'(j.c_total) + int'(cur_ch)) * nbytes;
    end
    skip = start_byte % BYTES_PER_WORD;

    ld_desc.tgt     = is_wgt ? TGT_WEIGHT : TGT_WINDOW;
    ld_desc.plane0  = is_wgt ? 4'd0 : t;
    ld_desc.skip    = 3'(skip);
    ld_desc.nbytes  = 16'(nbytes);
    if (j.order == ORDER_FC) begin
      ld_desc.row_len = is_wgt ? 16'd1 : 16'(CA);
      ld_desc.col0    = 16'd0;
      ld_desc.ncols   = is_wgt ? 8'd1 : 8'(CA);
      ld_desc.rows    = is_wgt ? 8'd1 : 8'(RA);
    end else begin
      ld_desc.row_len = is_wgt ? 16'(j.k.s) : j.w;
      ld_desc.col0    = is_wgt ? 16'd0 : j.w0;
      ld_desc.ncols   = is_wgt ? 8'(j.k.s) : 8'(CA + int'(j.k.s) - 1);
      ld_desc.rows    = is_wgt ? 8'(j.k.r) : 8'(RA + int'(j.k.r) - 1);
    end

    // FC: the shared input vector sits in the feature region and the
    // weight matrix in the weight region, though they travel the other way
    if (j.order == ORDER_FC) rd_cmd_type = is_wgt ? DT_FEATURE : DT_WEIGHT;
    else                     rd_cmd_type = is_wgt ? DT_WEIGHT : DT_FEATURE;
    rd_cmd_base = OW'(start_byte / BYTES_PER_WORD);
    rd_cmd_len  = OW'((skip + nbytes + BYTES_PER_WORD - 1) / BYTES_PER_WORD);

    // destination: broadcast windows under OC/NP and inputs under FC,
    // unicast otherwise
    if (j.order == ORDER_FC)                 dest_mask = is_wgt ? used : N'(1) << n;
    else if (!is_wgt && j.order != ORDER_IC) dest_mask = used;
    else                                     dest_mask = N'(1) << n;
  end

  assign job_ready = (st == S_IDLE);
  assign pass_k    = j.k;

  // per-array ALU operation and output routing
  always_comb begin
    logic fin;
    fin = (int'(c) == int'(groups) - 1);
    pass_first = (j.order inside {ORDER_NP, ORDER_FC}) ? (c == 0) : 1'b1;
    pass_last  = (j.order inside {ORDER_NP, ORDER_FC}) ? fin : 1'b1;
    for (int a = 0; a < N; a++) begin
      pass_op[a] = '0;
      route_new[a]  = (j.order != ORDER_IC) || (a == int'(j.n_arr) - 1);
      unique case (j.order)
        ORDER_NP, ORDER_FC: pass_op[a].out_en = 1'b1;
        ORDER_OC: begin
          pass_op[a].add_local   = (c != 0);
          pass_op[a].store_local = !fin;
          pass_op[a].out_en      = fin;
        end
        default: begin
          pass_op[a].add_bus = (a != 0);
          if (a == int'(j.n_arr) - 1) begin
            pass_op[a].add_local   = (c != 0);
            pass_op[a].store_local = !fin;
            pass_op[a].out_en      = fin;
          end else begin
            pass_op[a].out_en = 1'b1;
          end
        end
      endcase
      if (route_new[a]) begin
        pass_op[a].relu      = j.relu;
        pass_op[a].downscale = j.downscale;
        pass_op[a].shift     = j.shift;
        pass_op[a].pool      = j.pool;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; j <= '0; is_wgt <= 1'b0;
      c <= '0; n <= '0; t <= '0; used <= '0;
      rd_cmd_valid <= 1'b0; ld_desc_valid <= '0; pass_start <= '0; done <= 1'b0;
      route_dram <= '1;
    end else begin
      ld_desc_valid <= '0;
      pass_start    <= '0;
      done          <= 1'b0;
      unique case (st)
        S_IDLE: if (job_valid) begin
          j <= job;
          used <= (N'(1) << job.n_arr) - 1'b1;
          c <= '0; n <= '0; t <= '0; is_wgt <= 1'b0;
          st <= S_ROUTE;
        end
        // results still queued in the arrays must leave by the routing they
        // were made for: a routing change waits until every array is empty
        S_ROUTE: if (route_new == route_dram || arr_idle == '1) begin
          route_dram <= route_new;
          st <= S_DESC;
        end
        S_DESC: begin
          ld_desc_valid <= dest_mask;
          rd_cmd_valid  <= 1'b1;
          st <= S_READ;
        end
        S_READ: if (rd_cmd_ready) begin
          rd_cmd_valid <= 1'b0;
          st <= S_WAIT_RD;
        end
        S_WAIT_RD: if (!rd_cmd_valid && rd_cmd_ready && !rd_busy) begin
          // next load: windows of all planes, then filters
          if (j.order == ORDER_IC) begin
            // per array: T window planes, then its filter
            if (!is_wgt && int'(t) < int'(j.k.t) - 1) begin
              t <= t + 1'b1;
              st <= S_DESC;
            end else if (!is_wgt) begin
              is_wgt <= 1'b1;
              st <= S_DESC;
            end else if (int'(n) < int'(j.n_arr) - 1) begin
              n <= n + 1'b1; t <= '0; is_wgt <= 1'b0;
              st <= S_DESC;
            end else begin
              st <= S_PASS;
            end
          end else if (j.order == ORDER_FC) begin
            // per array: T weight planes; then one broadcast of the inputs
            if (!is_wgt && int'(t) < int'(j.k.t) - 1) begin
              t <= t + 1'b1;
              st <= S_DESC;
            end else if (!is_wgt && int'(n) < int'(j.n_arr) - 1) begin
              n <= n + 1'b1; t <= '0;
              st <= S_DESC;
            end else if (!is_wgt) begin
              is_wgt <= 1'b1;
              st <= S_DESC;
            end else begin
              st <= S_PASS;
            end
          end else begin
            if (!is_wgt && int'(t) < int'(j.k.t) - 1) begin
              t <= t + 1'b1;
              st <= S_DESC;
            end else if (!is_wgt) begin
              is_wgt <= 1'b1; n <= '0;
              st <= S_DESC;
            end else if (int'(n) < int'(j.n_arr) - 1) begin
              n <= n + 1'b1;
              st <= S_DESC;
            end else begin
              st <= S_PASS;
            end
          end
        end
        S_PASS: begin
          pass_start <= used;
          st <= S_WAIT_PASS;
        end
        S_WAIT_PASS: if ((arr_pass_busy & used) == '0 && pass_start == '0) begin
          n <= '0; t <= '0; is_wgt <= 1'b0;
          if (int'(c) == int'(groups) - 1) begin
            st <= S_DRAIN;
          end else begin
            c <= c + 1'b1;
            st <= S_DESC;
          end
        end
        S_DRAIN: if ((arr_busy & used) == '0) begin
          done <= 1'b1;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
