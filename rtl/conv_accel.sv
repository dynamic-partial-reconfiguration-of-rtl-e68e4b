// conv_accel: tiled Conv2d accelerator module (one per reconfiguration of
// the region for the YOLO part of the model).
//
// Computes one tile of
//   O[od][or][oc] = B[od] + sum_{id,ki,kj} W[od][id][ki][kj] * I[id][S*or+ki][S*oc+kj]
// for T_OD output maps and T_ID input maps at once. T_OD pipelined MAC trees,
// each T_ID wide, share the same T_ID input values every cycle: input map id
// lives in its own buffer bank, so one (pixel, ki, kj) step reads T_ID inputs
// in parallel, and each tree multiplies them with its own T_ID weights. The
// K*K steps of one output pixel are summed behind the trees, rounded to 9
// fractional bits and added to the output buffer: on the first input tile of
// a layer to the bias, otherwise to the partial sum already stored there, so
// that layers deeper than T_ID are done as a sequence of tiles. On the last
// input tile the sum is saturated to Q7.9 and, if the module has SiLU and the
// command asks for it, passed through SiLU. Batch normalisation costs nothing
// here: it is folded into W and B before the weights are loaded.
//
// Buffers (sizes as the design gives them): input T_IR x T_IC x T_ID words,
// weights K_MAX^2 x T_ID x T_OD words (T_OD*T_ID small memories, one per
// tree input, read together), output T_OR x T_OC x T_OD partial
// sums, plus T_OD biases.
//
// Interface (this design's own): the load port writes one word per cycle
// while the module is idle (ld_ready). Flat indices are
//   input  : (id*T_IR + r)*T_IC + c
//   weight : ((od*T_ID + id)*K_MAX + ki)*K_MAX + kj   (K=1 uses ki=kj=0)
//   bias   : od
// start takes a tile_cmd_t; busy stays high until done pulses. rd_addr
// (od*T_OR + r)*T_OC + c returns the stored value, saturated to Q7.9, on
// rd_data one cycle later. The tile rows/cols must satisfy
// S*(rows-1)+K <= T_IR (T_IC). Buffers are not cleared between tiles: when a
// layer has fewer than T_ID input maps left, the host loads zero weights for
// the unused ones.
//
// Timing: one kernel step per cycle, so a tile takes rows*cols*K*K cycles
// plus the pipeline depth LAT+2 (LAT = 1 + log2 T_ID) from start to done.
module conv_accel
  import fxp_pkg::*;
#(
  parameter int T_OD  = 8,
  parameter int T_ID  = 16,
  parameter int T_OR  = 64,
  parameter int T_OC  = 64,
  parameter int T_IR  = 64,
  parameter int T_IC  = 64,
  parameter int K_MAX = 3,
  parameter bit SILU_EN = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  // load port
  input  logic              ld_valid,
  output logic              ld_ready,
  input  buf_e              ld_buf,
  input  logic [ADDR_W-1:0] ld_addr,
  input  fxp_t              ld_data,
  // command
  input  logic              start,
  input  tile_cmd_t         cmd,
  output logic              busy,
  output logic              done,
  // output read port
  input  logic [ADDR_W-1:0] rd_addr,
  output fxp_t              rd_data
);

  localparam int IN_DEPTH  = T_IR * T_IC;
  localparam int OUT_DEPTH = T_OR * T_OC;
  localparam int KK        = K_MAX * K_MAX;
  localparam int IA_W      = (IN_DEPTH > 1) ? $clog2(IN_DEPTH) : 1;
  localparam int OA_W      = (OUT_DEPTH > 1) ? $clog2(OUT_DEPTH) : 1;
  localparam int LAT       = 1 + ((T_ID > 1) ? $clog2(T_ID) : 0);
  localparam int TREE_W    = 2 * DATA_W + ((T_ID > 1) ? $clog2(T_ID) : 0);
  localparam int P_W       = (KK > 1) ? $clog2(KK) : 1;
  localparam int OD_W      = (T_OD > 1) ? $clog2(T_OD) : 1;
  localparam int ID_W      = (T_ID > 1) ? $clog2(T_ID) : 1;

  // ------------------------------------------------------------------
  // Control state
  // ------------------------------------------------------------------
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e    state;
  tile_cmd_t cmd_q;

  typedef struct packed {
    logic            valid;
    logic [P_W-1:0]  p;          // kernel position ki*K_MAX+kj
    logic            first_pos;  // first kernel step of the pixel
    logic            last_pos;   // last kernel step of the pixel
    logic            last_pix;   // last pixel of the tile
    logic [OA_W-1:0] pix;        // output buffer address or*T_OC+oc
  } tag_t;

  logic [7:0] orow, ocol;
  logic [1:0] ki, kj;
  tag_t       issue;
  tag_t       tq [LAT+1];

  logic ld_fire;
  assign ld_ready = (state == S_IDLE);
  assign ld_fire  = ld_valid && ld_ready;
  assign busy     = (state != S_IDLE);

  wire last_k   = (ki == cmd_q.k - 2'd1) && (kj == cmd_q.k - 2'd1);
  wire last_col = (ocol == cmd_q.cols - 8'd1);
  wire last_row = (orow == cmd_q.rows - 8'd1);

  always_comb begin
    issue           = '0;
    issue.valid     = (state == S_RUN);
    issue.p         = P_W'(int'(ki) * K_MAX + int'(kj));
    issue.first_pos = (ki == 2'd0) && (kj == 2'd0);
    issue.last_pos  = last_k;
    issue.last_pix  = last_k && last_col && last_row;
    issue.pix       = OA_W'(int'(orow) * T_OC + int'(ocol));
  end

  logic done_q;  // set by the write-back stage, see below

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cmd_q <= '0;
      orow  <= '0;
      ocol  <= '0;
      ki    <= '0;
      kj    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          cmd_q <= cmd;
          orow  <= '0;
          ocol  <= '0;
          ki    <= '0;
          kj    <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          // kj fastest, then ki, then the output column, then the row
          if (kj != cmd_q.k - 2'd1) kj <= kj + 2'd1;
          else begin
            kj <= '0;
            if (ki != cmd_q.k - 2'd1) ki <= ki + 2'd1;
            else begin
              ki <= '0;
              if (!last_col) ocol <= ocol + 8'd1;
              else begin
                ocol <= '0;
                if (!last_row) orow <= orow + 8'd1;
                else state <= S_DRAIN;
              end
            end
          end
        end
        S_DRAIN: if (done_q) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Tag pipeline: tq[0] lines up with the input buffer read data (tree
  // input), tq[LAT] with the tree outputs.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j <= LAT; j++) tq[j] <= '0;
    end else begin
      tq[0] <= issue;
      for (int j = 1; j <= LAT; j++) tq[j] <= tq[j-1];
    end
  end

  // ------------------------------------------------------------------
  // Load port decode
  // ------------------------------------------------------------------
  logic [IA_W-1:0] in_waddr;
  logic [ID_W-1:0] in_wbank;
  logic            in_wsel;
  logic [OD_W-1:0] w_od;
  logic [ID_W-1:0] w_id;
  logic [P_W-1:0]  w_p;
  logic            w_wsel;
  logic            b_wsel;

  always_comb begin
    in_wbank = ID_W'(ld_addr / IN_DEPTH);
    in_waddr = IA_W'(ld_addr % IN_DEPTH);
    in_wsel  = ld_fire && (ld_buf == BUF_IN) && (ld_addr < ADDR_W'(IN_DEPTH * T_ID));
    w_od     = OD_W'(ld_addr / (T_ID * KK));
    w_id     = ID_W'((ld_addr / KK) % T_ID);
    w_p      = P_W'(ld_addr % KK);
    w_wsel   = ld_fire && (ld_buf == BUF_WEIGHT) && (ld_addr < ADDR_W'(KK * T_ID * T_OD));
    b_wsel   = ld_fire && (ld_buf == BUF_BIAS) && (ld_addr < ADDR_W'(T_OD));
  end

  // ------------------------------------------------------------------
  // Input buffer: one bank per input map
  // ------------------------------------------------------------------
  logic [IA_W-1:0] in_raddr;
  fxp_t            in_rdata [T_ID];

  always_comb begin
    in_raddr = IA_W'((int'(cmd_q.s) * int'(orow) + int'(ki)) * T_IC
                     + int'(cmd_q.s) * int'(ocol) + int'(kj));
  end

  for (genvar id = 0; id < T_ID; id++) begin : g_in
    tile_ram #(.DEPTH(IN_DEPTH), .W(DATA_W)) u_ram (
      .clk  (clk),
      .we   (in_wsel && (in_wbank == ID_W'(id))),
      .waddr(in_waddr),
      .wdata(ld_data),
      .raddr(in_raddr),
      .rdata(in_rdata[id])
    );
  end

  // ------------------------------------------------------------------
  // Weights: one small memory per (od, id) pair, addressed by kernel
  // position, so that all T_OD x T_ID weights of one step are read at once.
  // Biases: registers.
  // ------------------------------------------------------------------
  fxp_t w_rdata [T_OD][T_ID];
  fxp_t b_reg [T_OD];

  for (genvar od = 0; od < T_OD; od++) begin : g_wod
    for (genvar id = 0; id < T_ID; id++) begin : g_wid
      tile_ram #(.DEPTH(KK), .W(DATA_W)) u_w (
        .clk  (clk),
        .we   (w_wsel && (w_od == OD_W'(od)) && (w_id == ID_W'(id))),
        .waddr(w_p),
        .wdata(ld_data),
        .raddr(issue.p),
        .rdata(w_rdata[od][id])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (b_wsel) b_reg[OD_W'(ld_addr)] <= ld_data;
  end

  // ------------------------------------------------------------------
  // Output buffer read address: compute (stage A) or external port
  // ------------------------------------------------------------------
  logic [OA_W-1:0] out_raddr;
  logic [OD_W-1:0] rd_bank_q;
  psum_t           out_rdata [T_OD];

  always_comb begin
    if (busy) out_raddr = tq[LAT].pix;
    else      out_raddr = OA_W'(rd_addr % OUT_DEPTH);
  end

  always_ff @(posedge clk) rd_bank_q <= OD_W'(rd_addr / OUT_DEPTH);
  assign rd_data = sat_fxp(out_rdata[rd_bank_q]);

  // Stage B registers (write-back of one pixel).
  logic            b_valid, b_last_pix;
  logic [OA_W-1:0] b_pix;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid    <= 1'b0;
      b_last_pix <= 1'b0;
      b_pix      <= '0;
    end else begin
      b_valid    <= tq[LAT].valid && tq[LAT].last_pos;
      b_last_pix <= tq[LAT].valid && tq[LAT].last_pos && tq[LAT].last_pix;
      b_pix      <= tq[LAT].pix;
    end
  end
  assign done_q = b_valid && b_last_pix;
  assign done   = done_q;

  act_e act_mode;
  assign act_mode = (SILU_EN && cmd_q.act) ? ACT_SILU : ACT_NONE;

  // ------------------------------------------------------------------
  // One lane per output map: MAC tree, kernel accumulator, write-back
  // ------------------------------------------------------------------
  for (genvar od = 0; od < T_OD; od++) begin : g_od
    logic signed [TREE_W-1:0] tsum;
    logic                     tvalid;
    acc_t                     acc, acc_next;
    psum_t                    pix_sum;    // stage B: rounded pixel sum
    psum_t                    base, new_sum, wb_val;
    fxp_t                     act_out;

    mac_tree #(.N(T_ID), .IN_W(DATA_W), .OUT_W(TREE_W)) u_tree (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (tq[0].valid),
      .a        (in_rdata),
      .b        (w_rdata[od]),
      .out_valid(tvalid),
      .sum      (tsum)
    );

    assign acc_next = (tq[LAT].first_pos ? acc_t'(0) : acc) + acc_t'(tsum);

    always_ff @(posedge clk) begin
      if (tvalid) acc <= acc_next;
      pix_sum <= round_acc(acc_next);
    end

    pwl_act u_act (.x(sat_fxp(new_sum)), .mode(act_mode), .y(act_out));

    always_comb begin
      base    = cmd_q.first ? psum_t'(b_reg[od]) : out_rdata[od];
      new_sum = base + pix_sum;
      wb_val  = cmd_q.last ? psum_t'(act_out) : new_sum;
    end

    tile_ram #(.DEPTH(OUT_DEPTH), .W(PSUM_W)) u_out (
      .clk  (clk),
      .we   (b_valid),
      .waddr(b_pix),
      .wdata(wb_val),
      .raddr(out_raddr),
      .rdata(out_rdata[od])
    );
  end

  // ------------------------------------------------------------------
  // Protocol checks
  // ------------------------------------------------------------------
  property p_cmd_fits;
    @(posedge clk) disable iff (!rst_n)
      (start && state == S_IDLE) |->
        (cmd.k inside {2'd1, 2'd3}) && (int'(cmd.k) <= K_MAX) &&
        (cmd.s inside {2'd1, 2'd2}) && (cmd.rows != 0) && (cmd.cols != 0) &&
        (int'(cmd.rows) <= T_OR) && (int'(cmd.cols) <= T_OC) &&
        (int'(cmd.s) * (int'(cmd.rows) - 1) + int'(cmd.k) <= T_IR) &&
        (int'(cmd.s) * (int'(cmd.cols) - 1) + int'(cmd.k) <= T_IC);
  endproperty
  a_cmd_fits: assert property (p_cmd_fits) else $error("conv_accel: tile command does not fit the buffers");

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !start)
    else $error("conv_accel: start while busy");

endmodule
