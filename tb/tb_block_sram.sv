// tb_block_sram: writes random words, reads them back through the registered
// read port (one cycle latency), including read and write in the same cycle.
module tb_block_sram;
  localparam int DEPTH = 256, WIDTH = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0, re = 1'b0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  block_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [WIDTH-1:0] expv;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = i[$clog2(DEPTH)-1:0]; wdata = {$urandom, $urandom};
      model[i] = wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = $clog2(DEPTH)'($urandom); wdata = {$urandom, $urandom};
      re = 1'b1; raddr = $clog2(DEPTH)'($urandom);
      expv = model[raddr];  // read-before-write on a same-address collision
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      we = 1'b0; re = 1'b0;
      checks++;
      if (rdata !== expv) begin failures++; $display("FAIL: read %h exp %h", rdata, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
