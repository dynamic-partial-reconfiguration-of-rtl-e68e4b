// pwl_act: low-cost activation unit for Q7.9 values.
//
// Sigmoid is approximated by a piecewise-linear function whose slopes are
// powers of two, so each segment is a shift and an add (the PLAN scheme):
//   |x| >= 5           : y = 1
//   2.375 <= |x| < 5   : y = |x|/32 + 0.84375
//   1 <= |x| < 2.375   : y = |x|/8  + 0.625
//   0 <= |x| < 1       : y = |x|/4  + 0.5
//   x < 0              : y = 1 - y(|x|)
// SiLU reuses it as SiLU(x) = x * Sigmoid(x), one multiplier, rounded half up
// to Q7.9. mode selects ACT_NONE (pass x), ACT_SIGMOID or ACT_SILU.
// The unit is combinational. Using a piecewise-linear Sigmoid and deriving
// SiLU from it follows the design; the segment table is the classic PLAN one,
// chosen here because the exact breakpoints are not given.
module pwl_act
  import fxp_pkg::*;
(
  input  fxp_t x,
  input  act_e mode,
  output fxp_t y
);

  // Breakpoints and offsets in Q7.9.
  localparam logic [16:0] X_SAT = 17'd2560;  // 5.0
  localparam logic [16:0] X_MID = 17'd1216;  // 2.375
  localparam logic [16:0] X_ONE = 17'd512;   // 1.0

  logic [16:0] ax;        // |x|, 17 bits so that |-32768| fits
  logic [16:0] sig_pos;   // Sigmoid(|x|), in [0.5, 1]
  fxp_t        sig;       // Sigmoid(x)
  logic signed [31:0] prod;
  logic signed [31:0] silu_r;

  always_comb begin
    ax = x[15] ? 17'(-$signed({x[15], x})) : {1'b0, x};
    if (ax >= X_SAT)      sig_pos = 17'd512;
    else if (ax >= X_MID) sig_pos = (ax >> 5) + 17'd432;
    else if (ax >= X_ONE) sig_pos = (ax >> 3) + 17'd320;
    else                  sig_pos = (ax >> 2) + 17'd256;
    sig = x[15] ? fxp_t'(17'd512 - sig_pos) : fxp_t'(sig_pos);

    prod   = 32'(x) * 32'(sig);
    silu_r = (prod + 32'sd256) >>> FRAC_W;

    unique case (mode)
      ACT_SIGMOID: y = sig;
      ACT_SILU:    y = sat_fxp(silu_r);
      default:     y = x;
    endcase
  end

endmodule
