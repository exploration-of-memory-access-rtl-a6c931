// noc: on-chip network between the L2 SRAM and the PE arrays.
// Distribution: the L2 read stream (one 64-bit word per cycle) is delivered,
// after one register stage, to every PE array whose bit is set in dest_mask.
// One bit set is unicast (each array gets its own data, e.g. different input
// channels under loop order IC); several bits set is broadcast (the same
// input window to all arrays under OC and NP). is_bcast marks a broadcast
// word, for event counting.
// Collection: each array's output buffer either feeds the psum bus of the
// next array (route_dram low: the running channel sum of loop order IC moves
// from array n to array n+1) or competes for the output port towards DRAM
// (route_dram high). A round-robin arbiter grants one array per cycle; the
// port carries the array number with its row of Ca results.
// The psum bus data itself is plain wiring: bus_data[n] is array n-1's
// output row (array 0 gets zeros), so those outputs hold no logic of their
// own; only the valid/ready pairs of the bus are gated by route_dram.
// The same instance also carries input vectors (broadcast) and per-PE
// weights (unicast) of fully connected layers.
// Unicast/broadcast follows the document; the chained psum bus and the
// arbiter are this design's.
module noc
  import acc_pkg::*;
#(
  parameter int N  = 48,
  parameter int CA = 7,
  localparam int NW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // distribution
  input  logic [N-1:0]      dest_mask,
  input  logic              in_valid,
  input  logic [WORD_W-1:0] in_data,
  output logic [N-1:0]      ld_valid,
  output logic [WORD_W-1:0] ld_data,
  output logic              is_bcast,
  // collection
  input  logic [N-1:0]      route_dram,
  input  logic [N-1:0]      arr_out_valid,
  output logic [N-1:0]      arr_out_ready,
  input  logic [PSUM_W-1:0] arr_out_data [N][CA],
  output logic [N-1:0]      bus_valid,
  input  logic [N-1:0]      bus_ready,
  output logic [PSUM_W-1:0] bus_data [N][CA],
  output logic              out_valid,
  input  logic              out_ready,
  output logic [NW-1:0]     out_array,
  output logic [PSUM_W-1:0] out_data [CA]
);
  // ---------------- distribution ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_valid <= '0;
      ld_data  <= '0;
      is_bcast <= 1'b0;
    end else begin
      ld_valid <= in_valid ? dest_mask : '0;
      ld_data  <= in_data;
      is_bcast <= in_valid && ($countones(dest_mask) > 1);
    end
  end

  // ---------------- psum bus chain ----------------
  always_comb begin
    for (int n = 0; n < N; n++) begin
      if (n == 0) begin
        bus_valid[n] = 1'b0;
        for (int j = 0; j < CA; j++) bus_data[n][j] = '0;
      end else begin
        bus_valid[n] = arr_out_valid[n-1] && !route_dram[n-1];
        for (int j = 0; j < CA; j++) bus_data[n][j] = arr_out_data[n-1][j];
      end
    end
  end

  // ---------------- output arbitration ----------------
  logic [NW-1:0] last_grant, grant;
  logic          found;
  logic [N-1:0]  req;

  always_comb begin
    req   = arr_out_valid & route_dram;
    found = 1'b0;
    grant = '0;
    for (int k = 1; k <= N; k++) begin
      int idx;
      idx = (int'(last_grant) + k) % N;
      if (!found && req[idx]) begin
        found = 1'b1;
        grant = NW'(idx);
      end
    end
    out_valid = found;
    out_array = grant;
    for (int j = 0; j < CA; j++) out_data[j] = arr_out_data[grant][j];
    for (int n = 0; n < N; n++) begin
      if (route_dram[n])
        arr_out_ready[n] = found && out_ready && (int'(grant) == n);
      else
        arr_out_ready[n] = (n + 1 < N) ? bus_ready[(n + 1) % N] : 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      last_grant <= NW'(N - 1);
    else if (out_valid && out_ready) last_grant <= grant;
  end
endmodule
