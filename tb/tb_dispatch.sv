// tb_dispatch: loads an input window and a filter through load descriptors
// (unaligned starts, columns cut out of longer rows), then runs passes and
// checks every step against the kernel walk: weight, operand source, first /
// last flags, the edge pixels for ROW and COLUMN steps and the rows written
// into the temporal buffers. Checks that a pass issues exactly T*R*S steps,
// that with R*S >= RA it takes RA + T*R*S cycles, and that the last step
// waits while last_ok is low (output stall).
module tb_dispatch;
  import acc_pkg::*;
  localparam int RA = 3, CA = 4, KM = 5, KT = 3, TBD = 4;
  localparam int EL = (RA > CA) ? RA : CA;
  localparam int H = 8, W = 11, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ld_desc_valid = 1'b0, ld_valid = 1'b0, ld_busy;
  load_desc_t ld_desc = '0;
  logic [WORD_W-1:0] ld_data = '0;
  logic pass_start = 1'b0, pass_first = 1'b0, pass_last = 1'b0, pass_busy, last_ok = 1'b1;
  ksize_t pass_k = '0;
  alu_op_t pass_op = '0, step_op;
  logic step_valid, step_first, step_last, tload_valid, stall_temporal, stall_output;
  operand_src_e step_src;
  logic [DATA_W-1:0] step_weight;
  logic [DATA_W-1:0] edge_data [EL];
  logic [$clog2(RA)-1:0] tload_row;
  logic [DATA_W-1:0] tload_data [CA];
  int checks = 0, failures = 0, n_so = 0, n_st = 0;
  byte fmem [D*H*W];
  byte wmem [KT*KM*KM];

  dispatch #(.RA(RA), .CA(CA), .K_MAX(KM), .KT_MAX(KT), .TBUF_DEPTH(TBD)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin n_so += int'(stall_output); n_st += int'(stall_temporal); end

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
    @(negedge clk);
  endtask

  task automatic run(int kt, int kr, int ks, int d0, int h0, int w0, bit hold_last);
    byte fdyn [];
    byte wdyn [];
    load_desc_t ds;
    int st, steps, cyc, t, r, s, plane, li, busy_cyc;
    fdyn = new[D*H*W]; foreach (fdyn[i]) fdyn[i] = fmem[i];
    wdyn = new[kt*kr*ks]; foreach (wdyn[i]) wdyn[i] = wmem[i];
    for (int p = 0; p < kt; p++) begin
      st = ((d0 + p)*H + h0)*W;
      ds = '0; ds.tgt = TGT_WINDOW; ds.plane0 = 4'(p); ds.skip = 3'(st % 8);
      ds.nbytes = 16'((RA + kr - 1) * W); ds.row_len = 16'(W); ds.col0 = 16'(w0);
      ds.ncols = 8'(CA + ks - 1); ds.rows = 8'(RA + kr - 1);
      load(ds, st, fdyn);
    end
    ds = '0; ds.tgt = TGT_WEIGHT; ds.skip = 3'd0; ds.nbytes = 16'(kt*kr*ks);
    ds.row_len = 16'(ks); ds.ncols = 8'(ks); ds.rows = 8'(kr);
    load(ds, 0, wdyn);
    @(negedge clk);
    pass_start = 1'b1; pass_k.t = 4'(kt); pass_k.r = 4'(kr); pass_k.s = 4'(ks);
    pass_first = 1'b1; pass_last = 1'b1; pass_op = alu_op_t'($urandom);
    last_ok = !hold_last;
    @(negedge clk);
    pass_start = 1'b0;
    steps = 0; cyc = 0; plane = 0; li = 0; busy_cyc = 0;
    t = 0; r = 0; s = 0;
    while (pass_busy && cyc < 2000) begin
      busy_cyc++;
      if (hold_last && cyc == 60) begin last_ok = 1'b1; #1; end
      if (tload_valid) begin
        for (int j = 0; j < CA; j++) begin
          checks++;
          if (tload_data[j] !== fdyn[((d0 + plane)*H + h0 + li)*W + w0 + j] || int'(tload_row) != li) begin
            failures++; $display("FAIL: tload plane %0d row %0d", plane, li);
          end
        end
        if (li == RA - 1) begin li = 0; plane++; end else li++;
      end
      if (step_valid) begin
        operand_src_e es;
        es = (r == 0 && s == 0) ? SRC_TEMPORAL : (s == 0) ? SRC_COLUMN : SRC_ROW;
        checks++;
        if (step_weight !== wdyn[(t*kr + r)*ks + s] || step_src !== es ||
            step_first !== (steps == 0) || step_last !== (steps == kt*kr*ks - 1) || step_op !== pass_op) begin
          failures++; $display("FAIL: step %0d (t%0d r%0d s%0d)", steps, t, r, s);
        end
        if (es == SRC_ROW)
          for (int i = 0; i < RA; i++) begin
            checks++;
            if (edge_data[i] !== fdyn[((d0 + t)*H + h0 + i + r)*W + w0 + CA - 1 + s]) begin
              failures++; $display("FAIL: row edge %0d at t%0d r%0d s%0d", i, t, r, s);
            end
          end
        if (es == SRC_COLUMN)
          for (int j = 0; j < CA; j++) begin
            checks++;
            if (edge_data[j] !== fdyn[((d0 + t)*H + h0 + RA - 1 + r)*W + w0 + j]) begin
              failures++; $display("FAIL: column edge %0d at t%0d r%0d", j, t, r);
            end
          end
        steps++;
        if (s == ks - 1) begin s = 0; if (r == kr - 1) begin r = 0; t++; end else r++; end else s++;
      end
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (steps != kt*kr*ks) begin failures++; $display("FAIL: %0d steps, exp %0d", steps, kt*kr*ks); end
    if (!hold_last && kr*ks >= RA && busy_cyc != RA + kt*kr*ks) begin
      failures++; $display("FAIL: pass took %0d cycles, exp %0d", busy_cyc, RA + kt*kr*ks);
    end
    last_ok = 1'b1;
  endtask

  initial begin
    foreach (fmem[i]) fmem[i] = byte'($urandom);
    foreach (wmem[i]) wmem[i] = byte'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(3, 3, 3, 0, 0, 0, 0);
    run(3, 3, 3, 1, 2, 3, 0);
    run(2, 5, 5, 1, 0, 2, 0);
    run(1, 3, 2, 3, 1, 5, 0);
    run(3, 1, 1, 0, 4, 1, 0);   // R*S < RA: temporal stalls inside the pass
    run(2, 3, 3, 2, 3, 4, 1);   // last step held back
    checks += 2;
    if (n_so == 0) begin failures++; $display("FAIL: no output stall"); end
    if (n_st == 0) begin failures++; $display("FAIL: no temporal stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
