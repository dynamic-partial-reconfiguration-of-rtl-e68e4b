// gcn_accel: tiled fully connected layer accelerator for the GCN part of the
// model (one of the four modules of the reconfigurable region).
//
// A layer multiplies an input of Row x Column values with weights of
// Depth x Column values, giving Row x Depth outputs:
//   O[r][d] = B[d] + sum_c W[d][c] * I[r][c]
// Inputs and weights arrive in tiles of T_ROW x T_COL and T_DEP x T_COL.
// Each input column and each weight column has its own buffer bank, so the
// module reads one input row and one weight row per cycle and feeds them to a
// single T_COL-wide pipelined MAC tree: one dot product per cycle. The
// rounded dot product is added to the bias (first column tile) or to the
// partial sum in the output buffer (later column tiles); on the last column
// tile the result is saturated and, if asked, passed through the
// piecewise-linear Sigmoid.
//
// Because the activations of this part of the model are small, layers hand
// their results to each other on chip: a command with feedback set copies
// the finished T_ROW x T_DEP output tile into the input buffer, where it is
// the next layer's T_ROW x T_COL input (output depth d becomes input column
// d), with no trip through main memory. This needs T_DEP = T_COL.
//
// Interface (same as conv_accel, this design's own): load port flat indices
//   input  : r*T_COL + c      weight : d*T_COL + c      bias : d
// A tile_cmd_t gives rows (input rows used) and cols (output depths used);
// k and s are ignored. rd_addr r*T_DEP + d returns the stored output one
// cycle later. The tree always sums all T_COL columns and buffers are not
// cleared, so for a narrower input (or after a hand-over of fewer than T_COL
// outputs) the host loads zero weights for the unused columns.
//
// Timing: rows*cols cycles plus LAT+2 (LAT = 1 + log2 T_COL) per compute
// tile; a feedback copy takes rows*cols cycles plus 1.
// The tile sizes are this design's choice: the design does not state them.
module gcn_accel
  import fxp_pkg::*;
#(
  parameter int T_ROW = 64,
  parameter int T_COL = 64,
  parameter int T_DEP = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_valid,
  output logic              ld_ready,
  input  buf_e              ld_buf,
  input  logic [ADDR_W-1:0] ld_addr,
  input  fxp_t              ld_data,
  input  logic              start,
  input  tile_cmd_t         cmd,
  output logic              busy,
  output logic              done,
  input  logic [ADDR_W-1:0] rd_addr,
  output fxp_t              rd_data
);

  localparam int OUT_DEPTH = T_ROW * T_DEP;
  localparam int RA_W      = (T_ROW > 1) ? $clog2(T_ROW) : 1;
  localparam int DA_W      = (T_DEP > 1) ? $clog2(T_DEP) : 1;
  localparam int CA_W      = (T_COL > 1) ? $clog2(T_COL) : 1;
  localparam int OA_W      = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1;
  localparam int LAT       = 1 + ((T_COL > 1) ? $clog2(T_COL) : 0);
  localparam int TREE_W    = 2 * DATA_W + ((T_COL > 1) ? $clog2(T_COL) : 0);

  if (T_DEP != T_COL) begin : g_chk
    $error("gcn_accel: on-chip layer hand-over needs T_DEP == T_COL");
  end

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_COPY, S_DRAIN} state_e;
  state_e    state;
  tile_cmd_t cmd_q;

  typedef struct packed {
    logic            valid;
    logic            last;
    logic [RA_W-1:0] r;
    logic [DA_W-1:0] d;
  } tag_t;

  logic [7:0] row, dep;
  tag_t       issue;
  tag_t       tq [LAT+1];

  logic ld_fire;
  assign ld_ready = (state == S_IDLE);
  assign ld_fire  = ld_valid && ld_ready;
  assign busy     = (state != S_IDLE);

  wire last_dep = (dep == cmd_q.cols - 8'd1);
  wire last_row = (row == cmd_q.rows - 8'd1);

  always_comb begin
    issue       = '0;
    issue.valid = (state == S_RUN) || (state == S_COPY);
    issue.last  = last_dep && last_row;
    issue.r     = RA_W'(row);
    issue.d     = DA_W'(dep);
  end

  // ------------------------------------------------------------------
  // Sequencer: rows outer, output depth inner
  // ------------------------------------------------------------------
  logic done_q;
  logic copy_mode;  // the current command is a feedback copy

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd_q     <= '0;
      row       <= '0;
      dep       <= '0;
      copy_mode <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cmd_q     <= cmd;
          row       <= '0;
          dep       <= '0;
          copy_mode <= cmd.feedback;
          state     <= cmd.feedback ? S_COPY : S_RUN;
        end
        S_RUN, S_COPY: begin
          if (!last_dep) dep <= dep + 8'd1;
          else begin
            dep <= '0;
            if (!last_row) row <= row + 8'd1;
            else state <= S_DRAIN;
          end
        end
        S_DRAIN: if (done_q) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= LAT; j++) tq[j] <= '0;
    end else begin
      tq[0] <= issue;
      for (int j = 1; j <= LAT; j++) tq[j] <= tq[j-1];
    end
  end

  // ------------------------------------------------------------------
  // Load decode
  // ------------------------------------------------------------------
  logic [CA_W-1:0] ld_col;
  logic [RA_W-1:0] ld_row;
  logic [DA_W-1:0] ld_dep;
  logic            in_wsel, w_wsel, b_wsel;

  always_comb begin
    ld_col  = CA_W'(ld_addr % T_COL);
    ld_row  = RA_W'(ld_addr / T_COL);
    ld_dep  = DA_W'(ld_addr / T_COL);
    in_wsel = ld_fire && (ld_buf == BUF_IN) && (ld_addr < ADDR_W'(T_ROW * T_COL));
    w_wsel  = ld_fire && (ld_buf == BUF_WEIGHT) && (ld_addr < ADDR_W'(T_DEP * T_COL));
    b_wsel  = ld_fire && (ld_buf == BUF_BIAS) && (ld_addr < ADDR_W'(T_DEP));
  end

  // ------------------------------------------------------------------
  // Output buffer (one word per row and depth)
  // ------------------------------------------------------------------
  logic            ob_we;
  logic [OA_W-1:0] ob_waddr, ob_raddr;
  psum_t           ob_wdata, ob_rdata;

  // Copy path: the output word read at tq[0] is written to input bank d,
  // row r, one cycle later.
  logic            cp_valid, cp_last;
  logic [RA_W-1:0] cp_r;
  logic [DA_W-1:0] cp_d;

  // ------------------------------------------------------------------
  // Input and weight banks, one per column
  // ------------------------------------------------------------------
  fxp_t in_rdata [T_COL];
  fxp_t w_rdata  [T_COL];

  for (genvar c = 0; c < T_COL; c++) begin : g_col
    logic            iwe;
    logic [RA_W-1:0] iwaddr;
    fxp_t            iwdata;
    always_comb begin
      if (cp_valid) begin
        iwe    = (int'(cp_d) == c);
        iwaddr = cp_r;
        iwdata = sat_fxp(ob_rdata);
      end else begin
        iwe    = in_wsel && (ld_col == CA_W'(c));
        iwaddr = ld_row;
        iwdata = ld_data;
      end
    end
    tile_ram #(.DEPTH(T_ROW), .W(DATA_W)) u_in (
      .clk(clk), .we(iwe), .waddr(iwaddr), .wdata(iwdata),
      .raddr(issue.r), .rdata(in_rdata[c])
    );
    tile_ram #(.DEPTH(T_DEP), .W(DATA_W)) u_w (
      .clk(clk), .we(w_wsel && (ld_col == CA_W'(c))), .waddr(ld_dep), .wdata(ld_data),
      .raddr(issue.d), .rdata(w_rdata[c])
    );
  end

  fxp_t b_reg [T_DEP];
  always_ff @(posedge clk) begin
    if (b_wsel) b_reg[DA_W'(ld_addr)] <= ld_data;
  end

  // ------------------------------------------------------------------
  // Dot product and write-back
  // ------------------------------------------------------------------
  logic signed [TREE_W-1:0] tsum;
  logic                     tvalid;

  mac_tree #(.N(T_COL), .IN_W(DATA_W), .OUT_W(TREE_W)) u_tree (
    .clk(clk), .rst_n(rst_n),
    .in_valid(tq[0].valid && !copy_mode),
    .a(in_rdata), .b(w_rdata),
    .out_valid(tvalid), .sum(tsum)
  );

  // Stage A (tree output): read the old partial sum. Stage B: write.
  psum_t           dot_q;
  logic            b_valid, b_last;
  logic [OA_W-1:0] b_addr;
  logic [DA_W-1:0] b_d;
  fxp_t            act_out;
  psum_t           base, new_sum;

  always_comb begin
    if (busy && copy_mode)
      ob_raddr = OA_W'(int'(issue.r) * T_DEP + int'(issue.d));
    else if (busy)
      ob_raddr = OA_W'(int'(tq[LAT].r) * T_DEP + int'(tq[LAT].d));
    else
      ob_raddr = OA_W'(rd_addr % OUT_DEPTH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid  <= 1'b0;
      b_last   <= 1'b0;
      b_addr   <= '0;
      b_d      <= '0;
      dot_q    <= '0;
      cp_valid <= 1'b0;
      cp_last  <= 1'b0;
      cp_r     <= '0;
      cp_d     <= '0;
    end else begin
      b_valid  <= tvalid;
      b_last   <= tvalid && tq[LAT].last;
      b_addr   <= OA_W'(int'(tq[LAT].r) * T_DEP + int'(tq[LAT].d));
      b_d      <= tq[LAT].d;
      dot_q    <= round_acc(acc_t'(tsum));
      cp_valid <= issue.valid && copy_mode;
      cp_last  <= issue.valid && copy_mode && issue.last;
      cp_r     <= issue.r;
      cp_d     <= issue.d;
    end
  end

  act_e act_mode;
  assign act_mode = cmd_q.act ? ACT_SIGMOID : ACT_NONE;

  pwl_act u_act (.x(sat_fxp(new_sum)), .mode(act_mode), .y(act_out));

  always_comb begin
    base     = cmd_q.first ? psum_t'(b_reg[b_d]) : ob_rdata;
    new_sum  = base + dot_q;
    ob_we    = b_valid;
    ob_waddr = b_addr;
    ob_wdata = cmd_q.last ? psum_t'(act_out) : new_sum;
  end

  tile_ram #(.DEPTH(OUT_DEPTH), .W(PSUM_W)) u_out (
    .clk(clk), .we(ob_we), .waddr(ob_waddr), .wdata(ob_wdata),
    .raddr(ob_raddr), .rdata(ob_rdata)
  );

  assign done_q  = (b_valid && b_last) || cp_last;
  assign done    = done_q;
  assign rd_data = sat_fxp(ob_rdata);

  // ------------------------------------------------------------------
  // Protocol checks
  // ------------------------------------------------------------------
  a_cmd_fits: assert property (@(posedge clk) disable iff (!rst_n)
      (start && state == S_IDLE) |->
        (cmd.rows != 0) && (cmd.cols != 0) &&
        (int'(cmd.rows) <= T_ROW) && (int'(cmd.cols) <= T_DEP))
    else $error("gcn_accel: tile command does not fit the buffers");

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("gcn_accel: start while busy");

endmodule
