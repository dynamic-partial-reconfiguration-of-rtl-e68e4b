// mac_tree: pipelined multiply-add tree computing one N-element dot product
// per clock cycle.
//
// Stage 0 registers the N products a[i]*b[i] at full precision; then
// ceil(log2 N) registered adder levels halve the number of terms until one
// sum remains. The tree accepts a new pair of vectors every cycle and
// produces its sum LAT = 1 + ceil(log2 N) cycles later, with out_valid
// following in_valid by the same delay. The sum is exact: OUT_W must hold
// N full products. The tree itself follows the design's pipelined dot-product
// units; the register placement (one per level) is this design's choice.
module mac_tree #(
  parameter int N     = 16,
  parameter int IN_W  = 16,
  parameter int OUT_W = 2 * IN_W + ((N > 1) ? $clog2(N) : 0),
  localparam int LV   = (N > 1) ? $clog2(N) : 0,
  localparam int NP   = 1 << LV
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  a [N],
  input  logic signed [IN_W-1:0]  b [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum
);

  logic vld [LV+1];

  // Level 0: products, padded with zeros up to a power of two.
  logic signed [OUT_W-1:0] prod [NP];
  always_ff @(posedge clk) begin
    for (int i = 0; i < NP; i++)
      prod[i] <= (i < N) ? OUT_W'(a[i] * b[i]) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld[0] <= 1'b0;
    else        vld[0] <= in_valid;
  end

  // Adder levels: level l holds NP >> l partial sums.
  for (genvar l = 1; l <= LV; l++) begin : g_lv
    logic signed [OUT_W-1:0] s [NP >> l];
    for (genvar i = 0; i < (NP >> l); i++) begin : g_add
      if (l == 1) begin : g_first
        always_ff @(posedge clk) s[i] <= prod[2*i] + prod[2*i+1];
      end else begin : g_next
        always_ff @(posedge clk) s[i] <= g_lv[l-1].s[2*i] + g_lv[l-1].s[2*i+1];
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l] <= 1'b0;
      else        vld[l] <= vld[l-1];
    end
  end

  if (LV == 0) begin : g_single
    assign sum = prod[0];
  end else begin : g_sum
    assign sum = g_lv[LV].s[0];
  end
  assign out_valid = vld[LV];

endmodule
