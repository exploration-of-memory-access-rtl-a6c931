// tb_l2_config_regs: writes block ranges for each data type and checks the
// registers and the overlap flag against a model.
module tb_l2_config_regs;
  import acc_pkg::*;
  localparam int NB = 32, BW = $clog2(NB + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cfg_we = 1'b0, overlap;
  data_type_e cfg_type = DT_FEATURE;
  logic [BW-1:0] cfg_base = '0, cfg_num = '0;
  logic [BW-1:0] base [N_DTYPES];
  logic [BW-1:0] num  [N_DTYPES];
  int mb [N_DTYPES], mn [N_DTYPES];
  int checks = 0, failures = 0, n_ov = 0, n_ok = 0;

  l2_config_regs #(.N_BLOCKS(NB)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic ov;
    foreach (mb[i]) begin mb[i] = 0; mn[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_type = data_type_e'($urandom % 3);
      cfg_base = BW'($urandom % NB); cfg_num = BW'($urandom % 12);
      mb[cfg_type] = int'(cfg_base); mn[cfg_type] = int'(cfg_num);
      @(negedge clk);
      cfg_we = 1'b0;
      ov = 1'b0;
      for (int a = 0; a < N_DTYPES; a++)
        for (int b = a + 1; b < N_DTYPES; b++)
          if (mn[a] != 0 && mn[b] != 0 && mb[a] < mb[b] + mn[b] && mb[b] < mb[a] + mn[a]) ov = 1'b1;
      for (int a = 0; a < N_DTYPES; a++) begin
        checks++;
        if (int'(base[a]) != mb[a] || int'(num[a]) != mn[a]) begin failures++; $display("FAIL: regs of type %0d", a); end
      end
      checks++;
      if (overlap !== ov) begin failures++; $display("FAIL: overlap %0b exp %0b", overlap, ov); end
      if (ov) n_ov++; else n_ok++;
    end
    checks++;
    if (n_ov == 0 || n_ok == 0) begin failures++; $display("FAIL: overlap cases not both seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
