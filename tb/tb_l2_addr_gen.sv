// tb_l2_addr_gen: random region settings and offsets; checks block, row and
// the out-of-range flag against global = base*DEPTH + offset, including the
// last word of a range and the first word past it.
module tb_l2_addr_gen;
  import acc_pkg::*;
  localparam int NB = 32, DEPTH = 4096;
  localparam int BW = $clog2(NB + 1), RW = $clog2(DEPTH), OW = $clog2(NB * DEPTH);
  data_type_e dtype;
  logic [OW-1:0] offset;
  logic [BW-1:0] base [N_DTYPES];
  logic [BW-1:0] num  [N_DTYPES];
  logic [BW-1:0] block;
  logic [RW-1:0] row;
  logic err;
  int checks = 0, failures = 0, n_err = 0;

  l2_addr_gen #(.N_BLOCKS(NB), .DEPTH(DEPTH)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g;
    for (int i = 0; i < 3000; i++) begin
      for (int a = 0; a < N_DTYPES; a++) begin
        base[a] = BW'($urandom % 24);
        num[a]  = BW'(1 + $urandom % 8);
      end
      dtype  = data_type_e'($urandom % 3);
      offset = OW'($urandom % (10 * DEPTH));
      // every fourth offset sits right at the end of the type's range
      if (i % 4 == 0) offset = OW'(int'(num[dtype]) * DEPTH - 1 + int'($urandom % 2));
      #1;
      g = int'(base[dtype]) * DEPTH + int'(offset);
      checks++;
      if (err !== (int'(offset) >= int'(num[dtype]) * DEPTH)) begin failures++; $display("FAIL: err"); end
      if (err) n_err++;
      else begin
        checks++;
        if (int'(block) != g / DEPTH || int'(row) != g % DEPTH) begin
          failures++; $display("FAIL: block %0d row %0d for %0d", block, row, g);
        end
      end
    end
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL: no error case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
