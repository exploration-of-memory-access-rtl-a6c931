// tb_pe_array: one PE array (3 x 4 PEs) computing output tiles of a
// 3-channel 4 x 8 x 11 input chunk, compared with a direct convolution:
//   - single-channel passes (psums), checking the pass time RA + T*R*S,
//   - accumulation of all channels inside the MACs (loop order NP),
//   - accumulation of per-channel passes in the ALU buffer (loop order OC)
//     with relu and downscaling,
//   - adding psums that arrive on the psum bus (loop order IC),
//   - back-to-back short passes without reloading, which stall on the
//     temporal buffer and on the output drain, with the output side held.
module tb_pe_array;
  import acc_pkg::*;
  localparam int RA = 3, CA = 4, KM = 5, KT = 3;
  localparam int H = 8, W = 11, D = 4, CH = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ld_desc_valid = 1'b0, ld_valid = 1'b0;
  load_desc_t ld_desc = '0;
  logic [WORD_W-1:0] ld_data = '0;
  logic pass_start = 1'b0, pass_first = 1'b0, pass_last = 1'b0, busy, idle, pass_busy;
  ksize_t pass_k = '0;
  alu_op_t pass_op = '0;
  logic bus_valid = 1'b0, bus_ready, out_valid, out_ready;
  logic [PSUM_W-1:0] bus_data [CA];
  logic [PSUM_W-1:0] out_data [CA];
  logic stall_temporal, stall_output;
  int checks = 0, failures = 0, n_so = 0, n_st = 0, n_bus = 0;
  byte fmem [];
  byte wmem [];
  logic [CA*PSUM_W-1:0] expq [$];
  logic [CA*PSUM_W-1:0] busq [$];
  logic hold = 1'b0;

  pe_array #(.RA(RA), .CA(CA), .K_MAX(KM), .KT_MAX(KT)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    n_so += int'(stall_output); n_st += int'(stall_temporal);
    n_bus += int'(bus_valid && bus_ready);
  end
  always_ff @(posedge clk) out_ready <= !hold && ($urandom % 3 != 0);

  // psum bus source
  always_comb begin
    bus_valid = busq.size() != 0;
    for (int j = 0; j < CA; j++) bus_data[j] = bus_valid ? busq[0][j*PSUM_W +: PSUM_W] : '0;
  end
  always @(posedge clk) if (bus_valid && bus_ready) void'(busq.pop_front());

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [CA*PSUM_W-1:0] got;
    for (int j = 0; j < CA; j++) got[j*PSUM_W +: PSUM_W] = out_data[j];
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: unexpected row"); end
    else begin
      logic [CA*PSUM_W-1:0] e;
      e = expq.pop_front();
      if (got !== e) begin failures++; $display("FAIL: got %h exp %h", got, e); end
    end
  end

  task automatic load(load_desc_t ds, int start, ref byte mem []);
    int nw;
    @(negedge clk);
    ld_desc_valid = 1'b1; ld_desc = ds;
    @(negedge clk);
    ld_desc_valid = 1'b0;
    nw = (int'(ds.skip) + int'(ds.nbytes) + 7) / 8;
    for (int i = 0; i < nw; i++) begin
      for (int b = 0; b < 8; b++)
        ld_data[b*8 +: 8] = ((start/8)*8 + i*8 + b < mem.size()) ? mem[(start/8)*8 + i*8 + b] : 8'h0;
      ld_valid = 1'b1;
      @(negedge clk);
    end
    ld_valid = 1'b0;
  endtask

  task automatic load_tile(int c, int kt, int kr, int ks, int d0, int h0, int w0);
    load_desc_t ds;
    int st;
    for (int p = 0; p < kt; p++) begin
      st = ((c*D + d0 + p)*H + h0)*W;
      ds = '0; ds.tgt = TGT_WINDOW; ds.plane0 = 4'(p); ds.skip = 3'(st % 8);
      ds.nbytes = 16'((RA + kr - 1) * W); ds.row_len = 16'(W); ds.col0 = 16'(w0);
      ds.ncols = 8'(CA + ks - 1); ds.rows = 8'(RA + kr - 1);
      load(ds, st, fmem);
    end
    st = c*kt*kr*ks;
    ds = '0; ds.tgt = TGT_WEIGHT; ds.skip = 3'(st % 8); ds.nbytes = 16'(kt*kr*ks);
    ds.row_len = 16'(ks); ds.ncols = 8'(ks); ds.rows = 8'(kr);
    load(ds, st, wmem);
  endtask

  function automatic int conv(int c, int kt, int kr, int ks, int d0, int h0, int w0, int i, int j);
    int acc;
    acc = 0;
    for (int t = 0; t < kt; t++)
      for (int r = 0; r < kr; r++)
        for (int s = 0; s < ks; s++)
          acc += int'(fmem[((c*D + d0 + t)*H + h0 + i + r)*W + w0 + j + s]) * int'(wmem[c*kt*kr*ks + (t*kr + r)*ks + s]);
    return acc;
  endfunction

  // rows of a tile in drain order; sum of channels c_lo..c_hi plus `extra`
  task automatic tile_rows(int c_lo, int c_hi, int kt, int kr, int ks, int d0, int h0, int w0,
                           bit relu, bit ds, int sh, output logic [CA*PSUM_W-1:0] rows [RA]);
    int v;
    for (int k = 0; k < RA; k++)
      for (int j = 0; j < CA; j++) begin
        v = 0;
        for (int c = c_lo; c <= c_hi; c++) v += conv(c, kt, kr, ks, d0, h0, w0, RA - 1 - k, j);
        if (relu && v < 0) v = 0;
        if (ds) begin v = v >>> sh; if (v > 127) v = 127; if (v < -128) v = -128; end
        rows[k][j*PSUM_W +: PSUM_W] = v;
      end
  endtask

  task automatic pass(int kt, int kr, int ks, bit first, bit last, alu_op_t op, output int cyc);
    @(negedge clk);
    while (pass_busy) @(negedge clk);
    pass_start = 1'b1; pass_k.t = 4'(kt); pass_k.r = 4'(kr); pass_k.s = 4'(ks);
    pass_first = first; pass_last = last; pass_op = op;
    @(negedge clk);
    pass_start = 1'b0;
    cyc = 0;
    while (pass_busy) begin cyc++; @(negedge clk); end
  endtask

  task automatic drain();
    int g;
    g = 0;
    while ((expq.size() != 0 || !idle) && g < 20000) begin @(negedge clk); g++; end
  endtask

  initial begin
    logic [CA*PSUM_W-1:0] rows [RA];
    logic [CA*PSUM_W-1:0] bus_rows [RA];
    alu_op_t op;
    int cyc;
    fmem = new[CH*D*H*W]; foreach (fmem[i]) fmem[i] = byte'(int'($urandom % 32) - 16);
    wmem = new[CH*27];    foreach (wmem[i]) wmem[i] = byte'(int'($urandom % 32) - 16);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // single-channel psums, pass time
    for (int c = 0; c < CH; c++) begin
      load_tile(c, 3, 3, 3, 1, c, 2 + c);
      tile_rows(c, c, 3, 3, 3, 1, c, 2 + c, 0, 0, 0, rows);
      foreach (rows[k]) expq.push_back(rows[k]);
      op = '0; op.out_en = 1'b1;
      pass(3, 3, 3, 1, 1, op, cyc);
      checks++;
      if (cyc != RA + 27) begin failures++; $display("FAIL: pass %0d cycles, exp %0d", cyc, RA + 27); end
    end
    drain();

    // NP: channels accumulate in the MACs
    tile_rows(0, CH - 1, 3, 3, 3, 0, 1, 1, 0, 0, 0, rows);
    foreach (rows[k]) expq.push_back(rows[k]);
    for (int c = 0; c < CH; c++) begin
      load_tile(c, 3, 3, 3, 0, 1, 1);
      op = '0; op.out_en = 1'b1;
      pass(3, 3, 3, c == 0, c == CH - 1, op, cyc);
    end
    drain();

    // OC: per-channel passes summed in the ALU buffer, relu + downscale
    tile_rows(0, CH - 1, 3, 3, 3, 1, 2, 0, 1, 1, 4, rows);
    foreach (rows[k]) expq.push_back(rows[k]);
    for (int c = 0; c < CH; c++) begin
      load_tile(c, 3, 3, 3, 1, 2, 0);
      op = '0; op.add_local = (c != 0); op.store_local = (c != CH - 1); op.out_en = (c == CH - 1);
      op.relu = 1'b1; op.downscale = 1'b1; op.shift = 5'd4;
      pass(3, 3, 3, 1, 1, op, cyc);
    end
    drain();

    // IC: channel 0 arrives on the psum bus, channel 1 is computed here
    tile_rows(0, 0, 3, 3, 3, 0, 0, 3, 0, 0, 0, bus_rows);
    tile_rows(0, 1, 3, 3, 3, 0, 0, 3, 0, 0, 0, rows);
    foreach (rows[k]) expq.push_back(rows[k]);
    load_tile(1, 3, 3, 3, 0, 0, 3);
    op = '0; op.add_bus = 1'b1; op.out_en = 1'b1;
    pass(3, 3, 3, 1, 1, op, cyc);
    repeat (30) @(negedge clk);
    foreach (bus_rows[k]) busq.push_back(bus_rows[k]);
    drain();

    // short passes back to back with the output side held: 1x1x2 kernel
    hold = 1'b1;
    fork begin repeat (400) @(negedge clk); hold = 1'b0; end join_none
    load_tile(2, 2, 1, 1, 1, 3, 4);
    tile_rows(2, 2, 2, 1, 1, 1, 3, 4, 0, 0, 0, rows);
    for (int it = 0; it < 12; it++) begin
      foreach (rows[k]) expq.push_back(rows[k]);
      op = '0; op.out_en = 1'b1;
      pass(2, 1, 1, 1, 1, op, cyc);
    end
    hold = 1'b0;
    drain();

    checks += 4;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d rows missing", expq.size()); end
    if (n_so == 0) begin failures++; $display("FAIL: no output stall"); end
    if (n_st == 0) begin failures++; $display("FAIL: no temporal stall"); end
    if (n_bus == 0) begin failures++; $display("FAIL: no psum bus transfer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
