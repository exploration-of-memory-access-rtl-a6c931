// acc_pkg: types and constants shared by the 3D CNN accelerator.
// Data widths follow the design: 8-bit inputs and weights, 32-bit psums.
// The L2 word width, the operand-source encoding and the job descriptor
// layout are choices of this implementation.
package acc_pkg;
  localparam int DATA_W = 8;   // input feature / weight width
  localparam int PSUM_W = 32;  // partial sum width
  localparam int WORD_W = 64;  // L2 / DRAM word (8 bytes)
  localparam int BYTES_PER_WORD = WORD_W / DATA_W;

  // Loop ordering strategies (Algorithm 1)
  typedef enum logic [1:0] {
    ORDER_IC = 2'd0,   // input channel first: feature parallelism
    ORDER_OC = 2'd1,   // output channel first: filter parallelism
    ORDER_NP = 2'd2,   // no partial sum: psums consumed in the MAC
    ORDER_FC = 2'd3    // fully connected: input shared, weights per PE
  } loop_order_e;

  // Data types held in the reconfigurable L2
  typedef enum logic [1:0] {
    DT_FEATURE = 2'd0,
    DT_WEIGHT  = 2'd1,
    DT_PSUM    = 2'd2
  } data_type_e;
  localparam int N_DTYPES = 3;

  // Source of the PE operand in a step
  typedef enum logic [1:0] {
    SRC_TEMPORAL = 2'd0,  // start of a kernel plane: temporal buffer
    SRC_ROW      = 2'd1,  // next kernel column: row neighbour / row edge
    SRC_COLUMN   = 2'd2   // next kernel row: column neighbour / column edge
  } operand_src_e;

  // Load descriptor: places a contiguous byte stream into a 3-D box
  typedef enum logic {TGT_WINDOW = 1'b0, TGT_WEIGHT = 1'b1} load_tgt_e;

  typedef struct packed {
    load_tgt_e   tgt;
    logic [3:0]  plane0;    // first plane (t) written
    logic [2:0]  skip;      // bytes to drop from the first word
    logic [15:0] nbytes;    // bytes kept after the skip
    logic [15:0] row_len;   // bytes per source row
    logic [15:0] col0;      // first source column kept
    logic [7:0]  ncols;     // columns kept per row
    logic [7:0]  rows;      // rows per plane
  } load_desc_t;

  // Per-pass ALU operation, carried with the drained psums
  typedef struct packed {
    logic       add_bus;    // add the psum arriving on the psum bus
    logic       add_local;  // add the psum held in the ALU buffer
    logic       store_local;// keep the sum in the ALU buffer
    logic       out_en;     // send the result to the output buffer
    logic       relu;
    logic       downscale;  // 32 -> 8 bit: arithmetic shift and saturate
    logic [4:0] shift;
    logic [2:0] pool;       // max over this many consecutive results (0/1: off)
  } alu_op_t;

  // Kernel size of a pass
  typedef struct packed {
    logic [3:0] r;
    logic [3:0] s;
    logic [3:0] t;
  } ksize_t;

  // Tile job handed to the controller (one output tile, Ra x Ca x 1 plane,
  // or Ra x Ca neurons per array for a fully connected layer)
  typedef struct packed {
    loop_order_e order;
    logic [9:0]  n_arr;     // PE arrays used (M_t for OC/NP, C_t for IC)
    logic [13:0] chans;     // input channels C processed (FC: input slices)
    logic [13:0] c_total;   // channels per filter in the weight layout (FC: inputs)
    logic [9:0]  m0;        // first filter (FC: first block of RA*CA neurons)
    ksize_t      k;
    logic [15:0] h;         // chunk height (rows per plane)
    logic [15:0] w;         // chunk width (bytes per row)
    logic [15:0] d;         // chunk depth (planes per channel)
    logic [15:0] d0, h0, w0;// origin of the output tile in the chunk
    logic        relu;
    logic        downscale;
    logic [4:0]  shift;
    logic [2:0]  pool;
  } job_t;
endpackage
