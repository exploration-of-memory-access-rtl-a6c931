// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, count, full (in_ready low at DEPTH) and empty behaviour.
module tb_sync_fifo;
  localparam int WIDTH = 16, DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [WIDTH-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [WIDTH-1:0] q [$];

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = WIDTH'($urandom);
      out_ready = ($urandom % (i < 1500 ? 4 : 2)) == 0;
      checks++;
      if (int'(count) != q.size() || out_valid != (q.size() != 0) || in_ready != (q.size() < DEPTH)) begin
        failures++; $display("FAIL: count %0d model %0d", count, q.size());
      end
      if (out_valid) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("FAIL: data %h exp %h", out_data, q[0]); end
      end
      if (!in_ready) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
