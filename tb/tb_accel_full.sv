// tb_accel_full: end-to-end test of the accelerator with every parameter at
// its default (48 PE arrays of 7 x 7 PEs, 32 L2 blocks of 4096 words). The
// input chunk is 4 channels of 4 x 14 x 14 (the spatial size of C3D layers 5
// and 6), the filters 48 x 4 x 3 x 3 x 3; the same jobs and checks as the
// reduced-size test are run, with NP and OC using all 48 arrays.
module tb_accel_full;
  localparam int N = 48, RA = 7, CA = 7, L2B = 32, DEP = 4096;
  localparam int CH = 4, H = 14, W = 14, D = 4, M = 48;
  localparam int WD = 2000000;
`include "tb_accel_body.svh"
  accel_top dut (.*);
endmodule
