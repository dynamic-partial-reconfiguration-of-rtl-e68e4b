// fxp_pkg: number format, shared types and helper functions of the
// accelerator modules.
//
// Every activation, weight and bias is a 16-bit two's-complement fixed-point
// value with 7 integer bits (sign included) and 9 fractional bits (Q7.9), the
// format the model is quantised to. A Q7.9 x Q7.9 product carries 18
// fractional bits; dot products are summed at that precision and then rounded
// (round half up) back to 9 fractional bits into 32-bit partial sums, which
// stay wide across input tiles and are saturated to Q7.9 only when the last
// tile of a layer has been added. The rounding point, the partial-sum width
// and the command/load formats below are this design's own choices.
package fxp_pkg;

  localparam int DATA_W = 16;  // Q7.9 word
  localparam int FRAC_W = 9;   // fractional bits
  localparam int PSUM_W = 32;  // partial sum in the output buffers, 9 fractional bits
  localparam int ACC_W  = 48;  // accumulator of raw products (18 fractional bits)
  localparam int ADDR_W = 32;  // flat index width of the load and read ports

  typedef logic signed [DATA_W-1:0] fxp_t;
  typedef logic signed [PSUM_W-1:0] psum_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam fxp_t FXP_MAX = 16'sh7FFF;
  localparam fxp_t FXP_MIN = -16'sh8000;

  // Activation applied when the last input tile of a layer is written back.
  typedef enum logic [1:0] {
    ACT_NONE    = 2'd0,
    ACT_SIGMOID = 2'd1,
    ACT_SILU    = 2'd2
  } act_e;

  // Buffer addressed by the load port.
  typedef enum logic [1:0] {
    BUF_IN     = 2'd0,
    BUF_WEIGHT = 2'd1,
    BUF_BIAS   = 2'd2
  } buf_e;

  // Accelerator modules that can be loaded into the reconfigurable region.
  typedef enum logic [1:0] {
    RM_GCN   = 2'd0,
    RM_CONV1 = 2'd1,
    RM_CONV2 = 2'd2,
    RM_CONV3 = 2'd3
  } rm_e;

  // One tile command. For a convolution, rows/cols are the output tile size
  // (O_r, O_c of this tile), k the kernel size (1 or 3) and s the stride
  // (1 or 2). For a fully connected tile, rows counts input rows and cols the
  // output depth; k and s are ignored. first: start from the bias instead of
  // the stored partial sums. last: saturate and apply the activation after
  // adding. act: enable the module's activation. feedback (fully connected
  // only): instead of computing, copy the finished output tile into the
  // input buffer as the next layer's input.
  typedef struct packed {
    logic [7:0] rows;
    logic [7:0] cols;
    logic [1:0] k;
    logic [1:0] s;
    logic       first;
    logic       last;
    logic       act;
    logic       feedback;
  } tile_cmd_t;

  // Saturate a partial sum (9 fractional bits) to Q7.9.
  function automatic fxp_t sat_fxp(input psum_t v);
    if (v > psum_t'(FXP_MAX)) return FXP_MAX;
    if (v < psum_t'(FXP_MIN)) return FXP_MIN;
    return fxp_t'(v);
  endfunction

  // Round a raw product sum (18 fractional bits) to 9 fractional bits.
  function automatic psum_t round_acc(input acc_t a);
    acc_t r;
    r = (a + acc_t'(1 <<< (FRAC_W - 1))) >>> FRAC_W;
    return psum_t'(r);
  endfunction

endpackage
