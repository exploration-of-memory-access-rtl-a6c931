// tb_accel_top: end-to-end test of the accelerator at reduced size
// (4 PE arrays of 4 x 4 PEs, 8 L2 blocks of 512 words). It fills the L2 with
// a 4-channel 4 x 9 x 11 input chunk and 4 filters of 3 x 3 x 3, runs tile
// jobs under loop orders NP, OC and IC (with relu, downscaling and
// pooling), provokes an output-drain stall by holding back the DRAM side,
// runs a 2D layer, and compares every result row with a direct convolution.
// It counts temporal-buffer stalls, output stalls, broadcast and unicast
// words and psum-bus transfers and fails if any of them never happened.
module tb_accel_top;
  localparam int N = 4, RA = 4, CA = 4, L2B = 8, DEP = 512;
  localparam int CH = 4, H = 9, W = 11, D = 4, M = 4;
  localparam int WD = 400000;
`include "tb_accel_body.svh"
  accel_top #(.N_ARRAYS(N), .RA(RA), .CA(CA), .L2_BLOCKS(L2B), .BLOCK_DEPTH(DEP)) dut (.*);
endmodule
