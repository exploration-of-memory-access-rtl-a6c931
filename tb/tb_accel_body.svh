// Shared body of the end-to-end accelerator testbenches.
// The including module defines N, RA, CA, L2B, DEP, CH, H, W, D, M, WD
// and instantiates accel_top as `dut` after this file. The body acts as the
// off-chip DRAM: it fills the L2 with random features and filters, runs tile
// jobs under the three loop orders and a fully connected layer, and checks
// every result row against a direct evaluation of the 3D convolution (or
// the matrix-vector product of the FC layer) with
// the same post-processing (relu, 32->8 downscale, pooling along a column).
import acc_pkg::*;

localparam int BW = $clog2(L2B + 1);
localparam int OW = $clog2(L2B * DEP);
localparam int NW = (N > 1) ? $clog2(N) : 1;
localparam int FEAT_BYTES = CH * D * H * W;

logic clk = 1'b0;
logic rst_n = 1'b0;
always #5 clk = ~clk;

logic              cfg_we = 1'b0;
data_type_e        cfg_type = DT_FEATURE;
logic [BW-1:0]     cfg_base = '0, cfg_num = '0;
logic              fill_cmd_valid = 1'b0, fill_cmd_ready;
data_type_e        fill_cmd_type = DT_FEATURE;
logic [OW-1:0]     fill_cmd_base = '0, fill_cmd_len = '0;
logic              fill_valid = 1'b0, fill_ready;
logic [WORD_W-1:0] fill_data = '0;
logic              job_valid = 1'b0, job_ready, job_done;
job_t              job = '0;
logic              out_valid, out_ready;
logic [NW-1:0]     out_array;
logic [PSUM_W-1:0] out_data [CA];
logic              l2_err, l2_overlap;
logic              ev_stall_temporal, ev_stall_output, ev_bcast, ev_ucast, ev_bus;

int checks = 0, failures = 0;
int n_temporal = 0, n_output = 0, n_bcast = 0, n_ucast = 0, n_bus = 0;
int n_ic = 0, n_oc = 0, n_np = 0, n_fc = 0, n_post = 0, n_pool = 0, n_2d = 0;

byte fmem [];            // feature chunk [c][d][h][w]
byte wmem [];            // filters [m][c][t][r][s]
logic [CA*PSUM_W-1:0] expq [N][$];

// ---------------- output side (DRAM write-back) ----------------
logic hold = 1'b0;
always_ff @(posedge clk) out_ready <= !hold && (($urandom % 4) != 0);

always @(posedge clk) begin
  if (rst_n && out_valid && out_ready) begin
    logic [CA*PSUM_W-1:0] got, exp_v;
    for (int j = 0; j < CA; j++) got[j*PSUM_W +: PSUM_W] = out_data[j];
    checks++;
    if (expq[out_array].size() == 0) begin
      failures++;
      $display("FAIL: unexpected row from array %0d", out_array);
    end else begin
      exp_v = expq[out_array].pop_front();
      if (got !== exp_v) begin
        failures++;
        $display("FAIL: array %0d row got %h exp %h", out_array, got, exp_v);
      end
    end
  end
end

always @(posedge clk) if (rst_n) begin
  n_temporal += int'(ev_stall_temporal);
  n_output   += int'(ev_stall_output);
  n_bcast    += int'(ev_bcast);
  n_ucast    += int'(ev_ucast);
  n_bus      += int'(ev_bus);
  if (l2_err) begin
    failures++;
    $display("FAIL: L2 range error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
end

// ---------------- watchdog ----------------
initial begin
  repeat (WD) @(posedge clk);
  failures++;
  $display("FAIL: watchdog");
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end

// ---------------- helpers ----------------
function automatic byte rnd_byte();
  return byte'(int'($urandom % 16) - 8);
endfunction

task automatic set_region(data_type_e ty, int b, int nb);
  @(negedge clk);
  cfg_we = 1'b1; cfg_type = ty; cfg_base = BW'(b); cfg_num = BW'(nb);
  @(negedge clk);
  cfg_we = 1'b0;
endtask

task automatic fill(data_type_e ty, ref byte mem []);
  int nw;
  nw = (mem.size() + 7) / 8;
  @(negedge clk);
  fill_cmd_valid = 1'b1; fill_cmd_type = ty; fill_cmd_base = '0; fill_cmd_len = OW'(nw);
  do @(posedge clk); while (!fill_cmd_ready);
  @(negedge clk);
  fill_cmd_valid = 1'b0;
  for (int wi = 0; wi < nw; wi++) begin
    for (int b = 0; b < 8; b++)
      fill_data[b*8 +: 8] = (wi*8 + b < mem.size()) ? mem[wi*8 + b] : 8'h00;
    fill_valid = 1'b1;
    do @(posedge clk); while (!fill_ready);
    @(negedge clk);
  end
  fill_valid = 1'b0;
  repeat (2) @(negedge clk);
endtask

function automatic int conv(job_t jb, int m, int c_lo, int c_hi, int i, int j);
  int acc, fo, wo;
  acc = 0;
  for (int c = c_lo; c <= c_hi; c++)
    for (int t = 0; t < int'(jb.k.t); t++)
      for (int r = 0; r < int'(jb.k.r); r++)
        for (int s = 0; s < int'(jb.k.s); s++) begin
          fo = ((c*int'(jb.d) + int'(jb.d0) + t)*int'(jb.h) + int'(jb.h0) + i + r)*int'(jb.w) + int'(jb.w0) + j + s;
          wo = ((m*int'(jb.c_total) + c)*int'(jb.k.t) + t)*int'(jb.k.r)*int'(jb.k.s) + r*int'(jb.k.s) + s;
          acc += int'(fmem[fo]) * int'(wmem[wo]);
        end
  return acc;
endfunction

// fully connected: neuron (m, i, j) over inputs k, weights [m][k][i][j]
function automatic int fc_val(job_t jb, int m, int i, int j);
  int acc, nk, wo;
  acc = 0;
  nk = int'(jb.c_total);
  for (int k = 0; k < nk; k++) begin
    wo = ((m*nk + k)*RA + i)*CA + j;
    acc += int'(wmem[wo]) * int'(fmem[k]);
  end
  return acc;
endfunction

function automatic int post(job_t jb, int x);
  int v;
  v = (jb.relu && x < 0) ? 0 : x;
  if (jb.downscale) begin
    v = v >>> jb.shift;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
  end
  return v;
endfunction

// expected rows of one array: drained bottom PE row first, pooled along a column
task automatic expect_tile(job_t jb, int arr, int m, int c_lo, int c_hi);
  int p, v, best;
  logic [CA*PSUM_W-1:0] row;
  p = (jb.pool <= 1) ? 1 : int'(jb.pool);
  for (int k0 = 0; k0 + p <= RA; k0 += p) begin
    for (int j = 0; j < CA; j++) begin
      best = 0;
      for (int q = 0; q < p; q++) begin
        if (jb.order == ORDER_FC) v = post(jb, fc_val(jb, m, RA - 1 - (k0 + q), j));
        else                      v = post(jb, conv(jb, m, c_lo, c_hi, RA - 1 - (k0 + q), j));
        if (q == 0 || v > best) best = v;
      end
      row[j*PSUM_W +: PSUM_W] = best;
    end
    expq[arr].push_back(row);
  end
endtask

task automatic expect_job(job_t jb);
  if (jb.order == ORDER_IC)
    expect_tile(jb, int'(jb.n_arr) - 1, int'(jb.m0), 0, int'(jb.chans) - 1);
  else
    for (int n = 0; n < int'(jb.n_arr); n++)
      expect_tile(jb, n, int'(jb.m0) + n, 0, int'(jb.chans) - 1);
  case (jb.order)
    ORDER_IC: n_ic++;
    ORDER_OC: n_oc++;
    ORDER_FC: n_fc++;
    default:  n_np++;
  endcase
  if (jb.relu || jb.downscale) n_post++;
  if (jb.pool > 1) n_pool++;
  if (jb.k.t == 1 && jb.order != ORDER_FC) n_2d++;
endtask

// start a job; returns the cycles until job_done, or -1 after `limit` cycles
task automatic start_job(job_t jb, int limit, output int cyc);
  @(negedge clk);
  while (!job_ready) @(negedge clk);
  job = jb; job_valid = 1'b1;
  @(negedge clk);
  job_valid = 1'b0;
  cyc = 0;
  while (!job_done && (limit == 0 || cyc < limit)) begin
    @(negedge clk);
    cyc++;
  end
  if (!job_done) cyc = -1;
endtask

task automatic wait_outputs();
  int guard;
  guard = 0;
  forever begin
    int pending;
    pending = 0;
    for (int n = 0; n < N; n++) pending += expq[n].size();
    if (pending == 0 || guard > 200000) break;
    @(negedge clk);
    guard++;
  end
endtask

function automatic job_t mk_job(loop_order_e o, int narr, int chans, int m0,
                                int kt, int kr, int ks, int d0, int h0, int w0);
  job_t jb;
  jb = '0;
  jb.order = o; jb.n_arr = 10'(narr); jb.chans = 14'(chans); jb.c_total = 14'(CH);
  jb.m0 = 10'(m0); jb.k.t = 4'(kt); jb.k.r = 4'(kr); jb.k.s = 4'(ks);
  jb.h = 16'(H); jb.w = 16'(W); jb.d = 16'(D);
  jb.d0 = 16'(d0); jb.h0 = 16'(h0); jb.w0 = 16'(w0);
  jb.pool = 3'd1;
  return jb;
endfunction

task automatic make_weights(int kt, int kr, int ks);
  wmem = new[M * CH * kt * kr * ks];
  foreach (wmem[i]) wmem[i] = rnd_byte();
  fill(DT_WEIGHT, wmem);
endtask

// ---------------- the test ----------------
initial begin
  job_t jb;
  int cyc, narr;
  fmem = new[FEAT_BYTES];
  foreach (fmem[i]) fmem[i] = rnd_byte();
  repeat (3) @(negedge clk);
  rst_n = 1'b1;
  // L2 split for this layer: features, weights, psums in separate blocks
  set_region(DT_FEATURE, 0, L2B / 2);
  set_region(DT_WEIGHT, L2B / 2, L2B / 4);
  set_region(DT_PSUM, L2B / 2 + L2B / 4, L2B / 4);
  checks++;
  if (l2_overlap) begin failures++; $display("FAIL: L2 regions overlap"); end
  fill(DT_FEATURE, fmem);
  make_weights(3, 3, 3);

  narr = (N < M) ? N : M;
  // NP: psums stay inside the MACs across all channels
  jb = mk_job(ORDER_NP, narr, CH, 0, 3, 3, 3, 1, 1, 2);
  expect_job(jb); start_job(jb, 0, cyc);
  $display("NP job: %0d cycles", cyc);
  // OC: same tile, channel psums accumulated in the ALUs, with relu+downscale
  jb = mk_job(ORDER_OC, narr, CH, 0, 3, 3, 3, 0, 2, 1);
  jb.relu = 1'b1; jb.downscale = 1'b1; jb.shift = 5'd3;
  expect_job(jb); start_job(jb, 0, cyc);
  $display("OC job: %0d cycles", cyc);
  // IC: channels spread over arrays, summed along the psum bus
  jb = mk_job(ORDER_IC, 2, CH, 1, 3, 3, 3, 1, 0, 0);
  expect_job(jb); start_job(jb, 0, cyc);
  $display("IC job: %0d cycles", cyc);
  // IC over all channels at once, with relu and pooling
  jb = mk_job(ORDER_IC, CH, CH, M - 1, 3, 3, 3, 0, 1, 1);
  jb.relu = 1'b1; jb.pool = 3'd2;
  expect_job(jb); start_job(jb, 0, cyc);
  wait_outputs();

  // output back-pressure: results pile up until a new result has to wait
  hold = 1'b1;
  for (int it = 0; it < 12 && n_output == 0; it++) begin
    jb = mk_job(ORDER_NP, narr, 1, 0, 3, 3, 3, it % 2, 0, 0);
    expect_job(jb);
    start_job(jb, 4000, cyc);
    if (cyc < 0) begin
      hold = 1'b0;
      while (!job_done) @(negedge clk);
    end
  end
  hold = 1'b0;
  wait_outputs();

  // a 2D layer (T = 1): filters reloaded with the 2D layout
  make_weights(1, 3, 3);
  jb = mk_job(ORDER_OC, narr, CH, 0, 1, 3, 3, 2, 1, 0);
  jb.downscale = 1'b1; jb.shift = 5'd2;
  expect_job(jb); start_job(jb, 0, cyc);
  wait_outputs();

  // a fully connected layer: 6 inputs shared by all PEs, one weight per
  // PE and input; array n computes neurons (m0+n)*RA*CA ..
  fmem = new[6];
  foreach (fmem[i]) fmem[i] = rnd_byte();
  fill(DT_FEATURE, fmem);
  wmem = new[narr * 6 * RA * CA];
  foreach (wmem[i]) wmem[i] = rnd_byte();
  fill(DT_WEIGHT, wmem);
  jb = mk_job(ORDER_FC, narr, 2, 0, 3, 1, 1, 0, 0, 0);
  jb.c_total = 14'd6; jb.relu = 1'b1;
  expect_job(jb); start_job(jb, 0, cyc);
  $display("FC job: %0d cycles", cyc);
  wait_outputs();
  repeat (20) @(negedge clk);

  // every row expected must have arrived
  for (int n = 0; n < N; n++) begin
    checks++;
    if (expq[n].size() != 0) begin
      failures++;
      $display("FAIL: array %0d still expects %0d rows", n, expq[n].size());
    end
  end
  $display("events: temporal_stall=%0d output_stall=%0d bcast=%0d ucast=%0d bus=%0d",
           n_temporal, n_output, n_bcast, n_ucast, n_bus);
  $display("jobs: IC=%0d OC=%0d NP=%0d FC=%0d post=%0d pool=%0d 2d=%0d", n_ic, n_oc, n_np, n_fc, n_post, n_pool, n_2d);
  checks += 12;
  if (n_temporal == 0) begin failures++; $display("FAIL: no temporal stall"); end
  if (n_output == 0)   begin failures++; $display("FAIL: no output stall"); end
  if (n_bcast == 0)    begin failures++; $display("FAIL: no broadcast"); end
  if (n_ucast == 0)    begin failures++; $display("FAIL: no unicast"); end
  if (n_bus == 0)      begin failures++; $display("FAIL: no psum bus transfer"); end
  if (n_ic == 0)       begin failures++; $display("FAIL: no IC job"); end
  if (n_oc == 0)       begin failures++; $display("FAIL: no OC job"); end
  if (n_np == 0)       begin failures++; $display("FAIL: no NP job"); end
  if (n_fc == 0)       begin failures++; $display("FAIL: no FC job"); end
  if (n_post == 0)     begin failures++; $display("FAIL: no relu/downscale"); end
  if (n_pool == 0)     begin failures++; $display("FAIL: no pooling"); end
  if (n_2d == 0)       begin failures++; $display("FAIL: no 2D layer"); end
  $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  $finish;
end
