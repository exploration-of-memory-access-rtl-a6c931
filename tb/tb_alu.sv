// tb_alu: random ALU operations against a model of accumulate (psum bus and
// local buffer), relu, 32->8 downscale with saturation and max pooling.
// Checks the one-cycle latency of every result.
module tb_alu;
  import acc_pkg::*;
  localparam int BD = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, out_valid;
  alu_op_t op = '0;
  logic [$clog2(BD)-1:0] idx = '0;
  logic signed [PSUM_W-1:0] pe_psum = '0, bus_psum = '0, out_data;
  int checks = 0, failures = 0;
  int lbuf [BD];
  int pmax, pcnt, n_out = 0, n_pool = 0, n_sat = 0;

  alu #(.BUF_DEPTH(BD)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int sum, v, expv, p;
    logic exp_out;
    foreach (lbuf[i]) lbuf[i] = 0;
    pmax = 0; pcnt = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 300; blk++) begin
      // one operation setting per block of inputs, as per pass in the array
      op = '0;
      op.add_bus = 1'($urandom); op.add_local = 1'($urandom); op.store_local = 1'($urandom);
      op.out_en = ($urandom % 4) != 0; op.relu = 1'($urandom); op.downscale = 1'($urandom);
      op.shift = 5'($urandom % 8); op.pool = 3'($urandom % 4);
      pcnt = 0;
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        in_valid = ($urandom % 4) != 0;
        idx = $clog2(BD)'($urandom % BD);
        pe_psum = $signed(32'($urandom % 4000)) - 2000;
        bus_psum = $signed(32'($urandom % 4000)) - 2000;
        sum = pe_psum + (op.add_bus ? bus_psum : 0) + (op.add_local ? lbuf[idx] : 0);
        v = (op.relu && sum < 0) ? 0 : sum;
        if (op.downscale) begin
          v = v >>> op.shift;
          if (v > 127) begin v = 127; n_sat++; end
          if (v < -128) begin v = -128; n_sat++; end
        end
        p = (op.pool <= 1) ? 1 : int'(op.pool);
        exp_out = 1'b0;
        if (in_valid) begin
          if (op.store_local) lbuf[idx] = sum;
          if (op.out_en) begin
            if (pcnt == 0 || v > pmax) pmax = v;
            pcnt++;
            if (pcnt == p) begin exp_out = 1'b1; expv = pmax; pcnt = 0; if (p > 1) n_pool++; end
            else if (int'(idx) == BD - 1) pcnt = 0;
          end
        end
        @(negedge clk);
        in_valid = 1'b0;
        checks++;
        if (out_valid !== exp_out || (exp_out && out_data !== expv)) begin
          failures++; $display("FAIL: valid %0b/%0b data %0d/%0d", out_valid, exp_out, out_data, expv);
        end
        if (exp_out) n_out++;
      end
      // close any open pooling group with a tile's last row
      if (pcnt != 0) begin
        @(negedge clk);
        in_valid = 1'b1; idx = $clog2(BD)'(BD - 1); pe_psum = 0; bus_psum = 0;
        sum = (op.add_bus ? 0 : 0) + (op.add_local ? lbuf[BD-1] : 0);
        if (op.store_local) lbuf[BD-1] = sum;
        v = (op.relu && sum < 0) ? 0 : sum;
        if (op.downscale) begin v = v >>> op.shift; if (v > 127) v = 127; if (v < -128) v = -128; end
        if (v > pmax) pmax = v;
        pcnt++;
        exp_out = (pcnt == int'(op.pool));
        expv = pmax;
        pcnt = 0;
        @(negedge clk);
        in_valid = 1'b0;
        checks++;
        if (out_valid !== exp_out || (exp_out && out_data !== expv)) begin
          failures++; $display("FAIL: close valid %0b/%0b data %0d/%0d", out_valid, exp_out, out_data, expv);
        end
      end
    end
    checks += 3;
    if (n_out == 0) begin failures++; $display("FAIL: no output"); end
    if (n_pool == 0) begin failures++; $display("FAIL: no pooling"); end
    if (n_sat == 0) begin failures++; $display("FAIL: no saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
