// tb_noc: checks unicast and broadcast delivery (one register stage, data
// to exactly the masked arrays, is_bcast), the psum bus chain between
// neighbouring arrays, and the round-robin output arbiter: every granted row
// comes from a requesting array routed to DRAM, in arrival order per array,
// and no array waits more than N grants.
module tb_noc;
  import acc_pkg::*;
  localparam int N = 5, CA = 3, NW = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N-1:0] dest_mask = '0, ld_valid, route_dram = '1, arr_out_valid, arr_out_ready, bus_valid, bus_ready = '0;
  logic in_valid = 1'b0, is_bcast, out_valid, out_ready = 1'b0;
  logic [WORD_W-1:0] in_data = '0, ld_data;
  logic [PSUM_W-1:0] arr_out_data [N][CA];
  logic [PSUM_W-1:0] bus_data [N][CA];
  logic [NW-1:0] out_array;
  logic [PSUM_W-1:0] out_data [CA];
  int checks = 0, failures = 0;
  int cnt [N];
  int waitc [N];
  int n_b = 0, n_u = 0;

  noc #(.N(N), .CA(CA)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // each array offers rows numbered cnt[n]
  always_comb
    for (int n = 0; n < N; n++)
      for (int j = 0; j < CA; j++) arr_out_data[n][j] = PSUM_W'(n * 1000 + cnt[n] * 10 + j);

  initial begin
    logic [N-1:0] m;
    logic [WORD_W-1:0] dd;
    foreach (cnt[i]) begin cnt[i] = 0; waitc[i] = 0; end
    arr_out_valid = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // distribution
    for (int i = 0; i < 400; i++) begin
      m = ($urandom % 2) ? N'(1) << ($urandom % N) : N'($urandom);
      dd = {$urandom, $urandom};
      in_valid = ($urandom % 4) != 0; dest_mask = m; in_data = dd;
      @(negedge clk);
      checks++;
      if (ld_valid !== (in_valid ? m : '0) || (in_valid && ld_data !== dd) ||
          is_bcast !== (in_valid && $countones(m) > 1)) begin
        failures++; $display("FAIL: distribution mask %b", m);
      end
      if (in_valid && $countones(m) > 1) n_b++;
      if (in_valid && $countones(m) == 1) n_u++;
    end
    in_valid = 1'b0;
    // psum chain: array 1 feeds array 2
    route_dram = '1; route_dram[1] = 1'b0;
    arr_out_valid = '0; arr_out_valid[1] = 1'b1; bus_ready = '0; bus_ready[2] = 1'b1;
    #1;
    checks++;
    if (!bus_valid[2] || bus_data[2][1] !== arr_out_data[1][1] || !arr_out_ready[1] || out_valid) begin
      failures++; $display("FAIL: psum chain");
    end
    @(negedge clk);
    // arbitration
    route_dram = '1; route_dram[3] = 1'b0; bus_ready = '0;
    for (int i = 0; i < 2000; i++) begin
      for (int n = 0; n < N; n++) if (!arr_out_valid[n] || arr_out_ready[n]) arr_out_valid[n] = ($urandom % 3) != 0;
      out_ready = ($urandom % 4) != 0;
      #1;
      for (int n = 0; n < N; n++) if (arr_out_valid[n] && route_dram[n]) waitc[n]++;
      if (out_valid && out_ready) begin
        checks++;
        if (!arr_out_valid[out_array] || !route_dram[out_array] || out_data[2] !== arr_out_data[out_array][2]) begin
          failures++; $display("FAIL: grant to %0d", out_array);
        end
        waitc[out_array] = 0;
        cnt[out_array]++;
      end
      for (int n = 0; n < N; n++) begin
        if (waitc[n] > 3 * N) begin failures++; $display("FAIL: array %0d starved", n); waitc[n] = 0; end
      end
      @(negedge clk);
    end
    checks += 2;
    if (cnt[3] != 0) begin failures++; $display("FAIL: bus-routed array reached DRAM"); end
    if (n_b == 0 || n_u == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
