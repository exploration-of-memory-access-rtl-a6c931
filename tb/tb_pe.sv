// tb_pe: drives one PE with random steps and compares it with a model of the
// operand mux (temporal buffer / row_in / col_in), the row and column
// buffers, the multiply-accumulate with first/last and the output register
// chain (latch on last, shift otherwise).
module tb_pe;
  import acc_pkg::*;
  localparam int TB_D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic step_valid = 1'b0, step_first = 1'b0, step_last = 1'b0, tload_valid = 1'b0, out_shift = 1'b0;
  operand_src_e step_src = SRC_TEMPORAL;
  logic signed [DATA_W-1:0] weight = '0;
  logic [DATA_W-1:0] row_in = '0, col_in = '0, row_out, col_out, tload_data = '0;
  logic signed [PSUM_W-1:0] out_in = '0, out_out;
  int checks = 0, failures = 0, n_t = 0, n_r = 0, n_c = 0, n_last = 0, n_shift = 0;

  pe #(.TBUF_DEPTH(TB_D)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    byte unsigned tq [$];
    byte unsigned op, m_row, m_col;
    int acc, m_out;
    acc = 0; m_out = 0; m_row = 0; m_col = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      tload_valid = (tq.size() < TB_D) && (($urandom % 2) == 0);
      tload_data  = DATA_W'($urandom);
      step_valid  = ($urandom % 4) != 0;
      step_src    = operand_src_e'($urandom % 3);
      if (step_src == SRC_TEMPORAL && tq.size() == 0) step_src = SRC_ROW;
      step_first  = ($urandom % 8) == 0;
      step_last   = ($urandom % 8) == 0;
      out_shift   = ($urandom % 3) == 0;
      if (step_valid && step_last) out_shift = 1'b0;
      weight      = DATA_W'($urandom);
      row_in      = DATA_W'($urandom);
      col_in      = DATA_W'($urandom);
      out_in      = $signed($urandom);
      // model
      op = (step_src == SRC_TEMPORAL) ? tq[0] : (step_src == SRC_ROW) ? row_in : col_in;
      @(posedge clk);
      if (step_valid) begin
        acc = (step_first ? 0 : acc) + int'($signed(op)) * int'(weight);
        m_row = op;
        if (step_src != SRC_ROW) m_col = op;
        if (step_src == SRC_TEMPORAL) begin void'(tq.pop_front()); n_t++; end
        else if (step_src == SRC_ROW) n_r++; else n_c++;
      end
      if (step_valid && step_last) begin m_out = acc; n_last++; end
      else if (out_shift) begin m_out = out_in; n_shift++; end
      if (tload_valid) tq.push_back(tload_data);
      #1;
      checks++;
      if (out_out !== m_out || row_out !== m_row || col_out !== m_col) begin
        failures++;
        $display("FAIL: out %0d/%0d row %0d/%0d col %0d/%0d", out_out, m_out, row_out, m_row, col_out, m_col);
      end
    end
    checks++;
    if (n_t == 0 || n_r == 0 || n_c == 0 || n_last == 0 || n_shift == 0) begin failures++; $display("FAIL: coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
