// tb_controller: runs NP, OC, IC and FC jobs against a model of the L2 read port
// and of the PE arrays, and checks the controller's command stream: for each
// load the L2 word address and length, the destination mask (broadcast of
// windows under OC/NP and of inputs under FC, unicast otherwise) and the
// load descriptor; for each pass the arrays started, first/last flags and
// every array's ALU operation and output routing. Also checks that a routing change waits until all
// arrays are idle.
module tb_controller;
  import acc_pkg::*;
  localparam int N = 4, RA = 3, CA = 4, NB = 8, DEP = 512;
  localparam int OW = $clog2(NB * DEP);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic job_valid = 1'b0, job_ready, done;
  job_t job = '0;
  logic rd_cmd_valid, rd_cmd_ready, rd_busy;
  data_type_e rd_cmd_type;
  logic [OW-1:0] rd_cmd_base, rd_cmd_len;
  logic [N-1:0] dest_mask, ld_desc_valid, pass_start, route_dram;
  logic [N-1:0] arr_pass_busy = '0, arr_busy = '0, arr_idle = '1;
  load_desc_t ld_desc;
  ksize_t pass_k;
  logic pass_first, pass_last;
  alu_op_t pass_op [N];
  int checks = 0, failures = 0;

  typedef struct {
    bit wgt; int ch; int m; int t; logic [N-1:0] mask;
  } load_t;
  load_t loads [$];
  int passes_left;

  controller #(.N(N), .RA(RA), .CA(CA), .N_BLOCKS(NB), .DEPTH(DEP)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // L2 read port model: a command keeps the port busy for len cycles + 1
  int rd_left = 0;
  assign rd_cmd_ready = (rd_left == 0);
  assign rd_busy = (rd_left != 0);
  always @(posedge clk) begin
    if (rd_left != 0) rd_left <= rd_left - 1;
    else if (rd_cmd_valid) rd_left <= int'(rd_cmd_len) + 1;
  end

  // PE array model: pass_busy for 20 cycles after pass_start
  int pb [N];
  initial foreach (pb[i]) pb[i] = 0;
  always @(posedge clk) for (int n = 0; n < N; n++) begin
    if (pass_start[n]) pb[n] <= 20; else if (pb[n] != 0) pb[n] <= pb[n] - 1;
  end
  always_comb for (int n = 0; n < N; n++) begin arr_pass_busy[n] = (pb[n] != 0); arr_busy[n] = (pb[n] != 0); end

  job_t cur;
  int cur_c;     // channel (OC/NP) or group (IC) of the next pass
  int groups;
  int per_group; // loads before each pass

  // check each load against the head of the expected list
  always @(posedge clk) if (rst_n && rd_cmd_valid && rd_cmd_ready) begin
    load_t e;
    int sb, nb, sk;
    checks++;
    if (loads.size() == 0) begin failures++; $display("FAIL: unexpected load"); end
    else begin
      e = loads.pop_front();
      if (cur.order == ORDER_FC) begin
        // weights [m][k][RA][CA] from the weight region, inputs from the feature region
        nb = e.wgt ? int'(cur.k.t) : RA*CA;
        sb = e.wgt ? e.ch*nb : (e.m*int'(cur.c_total) + e.ch*int'(cur.k.t) + e.t)*nb;
      end else if (!e.wgt) begin
        sb = ((e.ch*int'(cur.d) + int'(cur.d0) + e.t)*int'(cur.h) + int'(cur.h0))*int'(cur.w);
        nb = (RA + int'(cur.k.r) - 1)*int'(cur.w);
      end else begin
        nb = int'(cur.k.t)*int'(cur.k.r)*int'(cur.k.s);
        sb = (e.m*int'(cur.c_total) + e.ch)*nb;
      end
      sk = sb % 8;
      if (cur.order == ORDER_FC) begin
        checks++;
        if (rd_cmd_type != (e.wgt ? DT_FEATURE : DT_WEIGHT) || int'(ld_desc.ncols) != (e.wgt ? 1 : CA) ||
            int'(ld_desc.rows) != (e.wgt ? 1 : RA) || int'(ld_desc.col0) != 0 || int'(ld_desc.row_len) != (e.wgt ? 1 : CA)) begin
          failures++; $display("FAIL: FC load wgt=%0d ch=%0d m=%0d t=%0d shape", e.wgt, e.ch, e.m, e.t);
        end
      end
      if ((cur.order != ORDER_FC && rd_cmd_type != (e.wgt ? DT_WEIGHT : DT_FEATURE)) || int'(rd_cmd_base) != sb/8 ||
          int'(rd_cmd_len) != (sk + nb + 7)/8 || dest_mask != e.mask ||
          ld_desc.tgt != (e.wgt ? TGT_WEIGHT : TGT_WINDOW) || int'(ld_desc.skip) != sk ||
          int'(ld_desc.nbytes) != nb || int'(ld_desc.plane0) != (e.wgt ? 0 : e.t) ||
          (cur.order != ORDER_FC && (int'(ld_desc.col0) != (e.wgt ? 0 : int'(cur.w0)) ||
          int'(ld_desc.ncols) != (e.wgt ? int'(cur.k.s) : CA + int'(cur.k.s) - 1) ||
          int'(ld_desc.rows) != (e.wgt ? int'(cur.k.r) : RA + int'(cur.k.r) - 1)))) begin
        failures++;
        $display("FAIL: load wgt=%0d ch=%0d m=%0d t=%0d: base %0d len %0d mask %b", e.wgt, e.ch, e.m, e.t,
                 rd_cmd_base, rd_cmd_len, dest_mask);
      end
    end
  end

  // check each pass
  always @(posedge clk) if (rst_n && pass_start != 0) begin
    logic fin;
    logic [N-1:0] used;
    used = (N'(1) << cur.n_arr) - 1'b1;
    fin = (cur_c == groups - 1);
    checks++;
    if (loads.size() != (groups - 1 - cur_c) * per_group || pass_start != used ||
        pass_first != (cur.order inside {ORDER_NP, ORDER_FC} ? cur_c == 0 : 1'b1) ||
        pass_last  != (cur.order inside {ORDER_NP, ORDER_FC} ? fin : 1'b1)) begin
      failures++; $display("FAIL: pass %0d start %b first %0b last %0b", cur_c, pass_start, pass_first, pass_last);
    end
    for (int a = 0; a < int'(cur.n_arr); a++) begin
      logic ad, al, sl, oe, rt;
      rt = (cur.order != ORDER_IC) || (a == int'(cur.n_arr) - 1);
      ad = (cur.order == ORDER_IC) && a != 0;
      al = 1'b0; sl = 1'b0; oe = 1'b1;
      if (cur.order == ORDER_OC || (cur.order == ORDER_IC && rt)) begin
        al = cur_c != 0; sl = !fin; oe = fin;
      end
      checks++;
      if (route_dram[a] != rt || pass_op[a].add_bus != ad || pass_op[a].add_local != al ||
          pass_op[a].store_local != sl || pass_op[a].out_en != oe ||
          pass_op[a].relu != (rt && cur.relu) || pass_op[a].shift != (rt ? cur.shift : 5'd0)) begin
        failures++; $display("FAIL: array %0d op in pass %0d", a, cur_c);
      end
    end
    cur_c++;
  end

  task automatic run(job_t jb);
    int na;
    na = int'(jb.n_arr);
    cur = jb; cur_c = 0;
    groups = (jb.order == ORDER_IC) ? int'(jb.chans) / na : int'(jb.chans);
    per_group = (jb.order == ORDER_IC) ? na * (int'(jb.k.t) + 1) :
                (jb.order == ORDER_FC) ? na * int'(jb.k.t) + 1 : int'(jb.k.t) + na;
    loads.delete();
    for (int g = 0; g < groups; g++) begin
      if (jb.order == ORDER_IC) begin
        for (int n = 0; n < na; n++) begin
          for (int t = 0; t < int'(jb.k.t); t++) loads.push_back('{0, g*na + n, 0, t, N'(1) << n});
          loads.push_back('{1, g*na + n, int'(jb.m0), 0, N'(1) << n});
        end
      end else if (jb.order == ORDER_FC) begin
        for (int n = 0; n < na; n++)
          for (int t = 0; t < int'(jb.k.t); t++) loads.push_back('{0, g, int'(jb.m0) + n, t, N'(1) << n});
        loads.push_back('{1, g, 0, 0, (N'(1) << na) - 1'b1});
      end else begin
        for (int t = 0; t < int'(jb.k.t); t++) loads.push_back('{0, g, 0, t, (N'(1) << na) - 1'b1});
        for (int n = 0; n < na; n++) loads.push_back('{1, g, int'(jb.m0) + n, 0, N'(1) << n});
      end
    end
    @(negedge clk);
    while (!job_ready) @(negedge clk);
    job = jb; job_valid = 1'b1;
    @(negedge clk);
    job_valid = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (loads.size() != 0 || cur_c != groups) begin
      failures++; $display("FAIL: job ended with %0d loads and %0d passes left", loads.size(), groups - cur_c);
    end
  endtask

  function automatic job_t mk(loop_order_e o, int na, int ch, int m0, int kt, int kr, int ks);
    job_t jb;
    jb = '0; jb.order = o; jb.n_arr = 10'(na); jb.chans = 14'(ch); jb.c_total = 14'(ch + 1);
    jb.m0 = 10'(m0); jb.k.t = 4'(kt); jb.k.r = 4'(kr); jb.k.s = 4'(ks);
    jb.h = 16'd13; jb.w = 16'd11; jb.d = 16'd5; jb.d0 = 16'd1; jb.h0 = 16'd2; jb.w0 = 16'd3;
    jb.relu = 1'b1; jb.shift = 5'd6;
    return jb;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(mk(ORDER_NP, 4, 3, 1, 3, 3, 3));
    run(mk(ORDER_OC, 3, 2, 0, 2, 3, 2));
    // routing changes for IC: hold the arrays non-idle and expect no load
    arr_idle = '0;
    fork
      run(mk(ORDER_IC, 2, 4, 2, 3, 3, 3));
      begin
        repeat (50) begin
          @(negedge clk);
          checks++;
          if (rd_cmd_valid) begin failures++; $display("FAIL: load before arrays idle"); end
        end
        arr_idle = '1;
      end
    join
    run(mk(ORDER_IC, 4, 4, 0, 1, 3, 3));
    run(mk(ORDER_NP, 1, 2, 3, 1, 1, 1));
    // fully connected: 3 slices of 3 inputs (c_total = 9 inputs)
    begin job_t jb; jb = mk(ORDER_FC, 3, 3, 1, 3, 1, 1); jb.c_total = 14'd9; run(jb); end
    begin job_t jb; jb = mk(ORDER_FC, 4, 2, 0, 2, 1, 1); jb.c_total = 14'd4; run(jb); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
