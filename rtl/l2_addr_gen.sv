// l2_addr_gen: address generator of the reconfigurable L2 SRAM.
// Turns a word offset inside the region of one data type into a physical
// block number and a row inside that block:
//   global = base[type] * DEPTH + offset, block = global / DEPTH,
//   row = global % DEPTH,
// and flags an offset beyond the blocks given to that type (err). Purely
// combinational. The document places address generators between the FSM and
// the blocks; this mapping is this design's.
module l2_addr_gen
  import acc_pkg::*;
#(
  parameter int N_BLOCKS = 32,
  parameter int DEPTH    = 4096,
  localparam int BW = $clog2(N_BLOCKS + 1),
  localparam int RW = $clog2(DEPTH),
  localparam int OW = $clog2(N_BLOCKS * DEPTH)
) (
  input  data_type_e    dtype,
  input  logic [OW-1:0] offset,
  input  logic [BW-1:0] base [N_DTYPES],
  input  logic [BW-1:0] num  [N_DTYPES],
  output logic [BW-1:0] block,
  output logic [RW-1:0] row,
  output logic          err
);
  logic [OW:0] global_w;
  always_comb begin
    global_w = (OW+1)'(base[dtype]) * (OW+1)'(DEPTH) + (OW+1)'(offset);
    block    = BW'(global_w / (OW+1)'(DEPTH));
    row      = RW'(global_w % (OW+1)'(DEPTH));
    err      = (int'(dtype) >= N_DTYPES) ||
               ((OW+1)'(offset) >= (OW+1)'(num[dtype]) * (OW+1)'(DEPTH));
  end
endmodule
