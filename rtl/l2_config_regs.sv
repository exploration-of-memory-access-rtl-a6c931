// l2_config_regs: configuration registers of the reconfigurable L2 SRAM.
// For each data type (features, weights, psums) they hold the first block
// and the number of blocks given to it; the blocks of one type are
// contiguous. They are written at the start of each layer (cfg_we with the
// type, first block and count) and read by the address generators and the
// read & write FSM. A write takes effect on the next cycle. Reset gives
// every type zero blocks. That the ranges are contiguous and set per layer
// follows the document; the register layout is this design's.
module l2_config_regs
  import acc_pkg::*;
#(
  parameter int N_BLOCKS = 32,
  localparam int BW = $clog2(N_BLOCKS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  data_type_e    cfg_type,
  input  logic [BW-1:0] cfg_base,
  input  logic [BW-1:0] cfg_num,
  output logic [BW-1:0] base [N_DTYPES],
  output logic [BW-1:0] num  [N_DTYPES],
  output logic          overlap  // two types share a block
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_DTYPES; i++) begin
        base[i] <= '0;
        num[i]  <= '0;
      end
    end else if (cfg_we && int'(cfg_type) < N_DTYPES) begin
      base[cfg_type] <= cfg_base;
      num[cfg_type]  <= cfg_num;
    end
  end

  always_comb begin
    overlap = 1'b0;
    for (int a = 0; a < N_DTYPES; a++)
      for (int b = a + 1; b < N_DTYPES; b++)
        if (num[a] != 0 && num[b] != 0 &&
            int'(base[a]) < int'(base[b]) + int'(num[b]) &&
            int'(base[b]) < int'(base[a]) + int'(num[a]))
          overlap = 1'b1;
  end
endmodule
