// tb_l2_sram: partitions a small L2 (6 blocks of 64 words) between the three
// data types, writes each region with strided patterns, reads back with
// other patterns and checks data, one-cycle read latency, rd_last, that a
// region crossing a block boundary maps to the next block of its range, and
// that an access beyond a region raises err without touching memory.
module tb_l2_sram;
  import acc_pkg::*;
  localparam int NB = 6, DEP = 64;
  localparam int BW = $clog2(NB + 1), OW = $clog2(NB * DEP);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cfg_we = 1'b0;
  data_type_e cfg_type = DT_FEATURE;
  logic [BW-1:0] cfg_base = '0, cfg_num = '0;
  logic wr_cmd_valid = 1'b0, wr_cmd_ready, wr_valid = 1'b0, wr_ready;
  data_type_e wr_cmd_type = DT_FEATURE, rd_cmd_type = DT_FEATURE;
  logic [OW-1:0] wr_cmd_base = '0, wr_cmd_len = '0, wr_cmd_count = '0, wr_cmd_stride = '0;
  logic [WORD_W-1:0] wr_data = '0, rd_data;
  logic rd_cmd_valid = 1'b0, rd_cmd_ready, rd_valid, rd_last, rd_busy, err, cfg_overlap;
  logic [OW-1:0] rd_cmd_base = '0, rd_cmd_len = '0, rd_cmd_count = '0, rd_cmd_stride = '0;
  int checks = 0, failures = 0;
  logic [WORD_W-1:0] model [N_DTYPES][NB*DEP];
  bit written [N_DTYPES][NB*DEP];
  int rb [N_DTYPES] = '{0, 3, 4};
  int rn [N_DTYPES] = '{3, 1, 2};

  l2_sram #(.N_BLOCKS(NB), .DEPTH(DEP)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(data_type_e ty, int b, int l, int c, int s);
    @(negedge clk);
    wr_cmd_valid = 1'b1; wr_cmd_type = ty; wr_cmd_base = OW'(b); wr_cmd_len = OW'(l);
    wr_cmd_count = OW'(c); wr_cmd_stride = OW'(s);
    @(negedge clk);
    wr_cmd_valid = 1'b0;
    for (int bb = 0; bb < c; bb++)
      for (int i = 0; i < l; i++) begin
        wr_valid = 1'b1; wr_data = {$urandom, $urandom};
        if (b + bb*s + i < rn[ty]*DEP) begin model[ty][b + bb*s + i] = wr_data; written[ty][b + bb*s + i] = 1'b1; end
        @(negedge clk);
        wr_valid = ($urandom % 3) == 0 ? 1'b0 : 1'b1;
        if (!wr_valid) @(negedge clk);
      end
    wr_valid = 1'b0;
    @(negedge clk);
  endtask

  task automatic rd(data_type_e ty, int b, int l, int c, int s);
    int k;
    @(negedge clk);
    rd_cmd_valid = 1'b1; rd_cmd_type = ty; rd_cmd_base = OW'(b); rd_cmd_len = OW'(l);
    rd_cmd_count = OW'(c); rd_cmd_stride = OW'(s);
    @(negedge clk);
    rd_cmd_valid = 1'b0;
    @(negedge clk);  // one cycle of read latency
    k = 0;
    for (int bb = 0; bb < c; bb++)
      for (int i = 0; i < l; i++) begin
        checks++;
        if (!rd_valid || rd_last != (bb == c-1 && i == l-1) ||
            (written[ty][b + bb*s + i] && rd_data !== model[ty][b + bb*s + i])) begin
          failures++; $display("FAIL: read type %0d offset %0d", ty, b + bb*s + i);
        end
        @(negedge clk);
      end
    checks++;
    if (rd_valid) begin failures++; $display("FAIL: extra read data"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N_DTYPES; a++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_type = data_type_e'(a); cfg_base = BW'(rb[a]); cfg_num = BW'(rn[a]);
    end
    @(negedge clk);
    cfg_we = 1'b0;
    checks++;
    if (cfg_overlap) begin failures++; $display("FAIL: overlap"); end
    wr(DT_FEATURE, 0, 3*DEP, 1, 0);           // whole feature range, three blocks
    wr(DT_WEIGHT, 5, 8, 4, 12);
    wr(DT_PSUM, DEP - 6, 12, 2, 40);         // crosses into the second psum block
    rd(DT_FEATURE, 0, 3*DEP, 1, 0);
    rd(DT_FEATURE, DEP - 3, 7, 3, DEP - 4);
    rd(DT_WEIGHT, 5, 8, 4, 12);
    rd(DT_PSUM, DEP - 6, 12, 2, 40);
    // psum offset 0 is block 4 row 0, feature offset 2*DEP is block 2 row 0
    checks++;
    if (dut.g_blk[4].u_blk.mem[DEP - 6] !== model[DT_PSUM][DEP - 6] ||
        dut.g_blk[2].u_blk.mem[0] !== model[DT_FEATURE][2*DEP]) begin
      failures++; $display("FAIL: block mapping");
    end
    checks++;
    if (err) begin failures++; $display("FAIL: early err"); end
    // out of range: weights own one block
    wr(DT_WEIGHT, DEP - 1, 2, 1, 0);
    checks += 2;
    if (!err) begin failures++; $display("FAIL: no err"); end
    if (dut.g_blk[4].u_blk.mem[0] === model[DT_WEIGHT][DEP] && written[DT_WEIGHT][DEP]) begin
      failures++; $display("FAIL: out of range write landed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
