// tb_l2_rw_fsm: random read and write pattern commands; checks the offset
// sequence base + b*stride + i, the last flag, one read address per cycle
// and that write addresses advance only with write data.
module tb_l2_rw_fsm;
  import acc_pkg::*;
  localparam int NB = 4, DEPTH = 256, OW = $clog2(NB * DEPTH);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rd_cmd_valid = 1'b0, rd_cmd_ready, rd_addr_valid, rd_addr_last;
  data_type_e rd_cmd_type = DT_FEATURE, rd_addr_type, wr_cmd_type = DT_FEATURE, wr_addr_type;
  logic [OW-1:0] rd_cmd_base = '0, rd_cmd_len = '0, rd_cmd_count = '0, rd_cmd_stride = '0, rd_addr;
  logic wr_cmd_valid = 1'b0, wr_cmd_ready, wr_data_valid = 1'b0, wr_ready;
  logic [OW-1:0] wr_cmd_base = '0, wr_cmd_len = '0, wr_cmd_count = '0, wr_cmd_stride = '0, wr_addr;
  int checks = 0, failures = 0;

  l2_rw_fsm #(.N_BLOCKS(NB), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int b0, l, c, s, k, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 100; it++) begin
      b0 = $urandom % 64; l = 1 + $urandom % 9; c = 1 + $urandom % 4; s = l + $urandom % 8;
      // read pattern
      @(negedge clk);
      rd_cmd_valid = 1'b1; rd_cmd_type = data_type_e'(it % 3);
      rd_cmd_base = OW'(b0); rd_cmd_len = OW'(l); rd_cmd_count = OW'(c); rd_cmd_stride = OW'(s);
      @(negedge clk);
      rd_cmd_valid = 1'b0;
      k = 0; cyc = 0;
      for (int bb = 0; bb < c; bb++)
        for (int i = 0; i < l; i++) begin
          checks++;
          if (!rd_addr_valid || int'(rd_addr) != b0 + bb*s + i || rd_addr_type != data_type_e'(it % 3) ||
              rd_addr_last != (bb == c-1 && i == l-1)) begin
            failures++; $display("FAIL: read addr %0d exp %0d", rd_addr, b0 + bb*s + i);
          end
          @(negedge clk);
        end
      checks++;
      if (rd_addr_valid || !rd_cmd_ready) begin failures++; $display("FAIL: read engine not idle"); end
      // write pattern with gaps in the data
      @(negedge clk);
      wr_cmd_valid = 1'b1; wr_cmd_type = DT_PSUM;
      wr_cmd_base = OW'(b0); wr_cmd_len = OW'(l); wr_cmd_count = OW'(c); wr_cmd_stride = OW'(s);
      @(negedge clk);
      wr_cmd_valid = 1'b0;
      for (int bb = 0; bb < c; bb++)
        for (int i = 0; i < l; i++) begin
          wr_data_valid = 1'b0;
          while (($urandom % 3) == 0) begin
            @(negedge clk);
            checks++;
            if (wr_ready) begin failures++; $display("FAIL: wr_ready without data"); end
          end
          wr_data_valid = 1'b1;
          #1;
          checks++;
          if (!wr_ready || int'(wr_addr) != b0 + bb*s + i) begin
            failures++; $display("FAIL: write addr %0d exp %0d", wr_addr, b0 + bb*s + i);
          end
          @(negedge clk);
        end
      wr_data_valid = 1'b0;
      checks++;
      if (!wr_cmd_ready) begin failures++; $display("FAIL: write engine not idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
