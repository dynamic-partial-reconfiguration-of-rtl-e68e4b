// tb_conv_accel: drives a small conv_accel (4x4 lanes, 8x8 output tile,
// 17x17 input tile) through four tiles and checks every output word against
// a reference convolution computed here:
//   1. K=3, S=1 over two input-depth tiles (first, then last with SiLU)
//   2. K=1, S=2, no activation
//   3. K=3, S=2 with large weights, so that results saturate, with SiLU
// Each tile's start-to-done time must be rows*cols*K*K + LAT + 2 cycles.
module tb_conv_accel;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  localparam int T_OD = 4, T_ID = 4, T_OR = 8, T_OC = 8, T_IR = 17, T_IC = 17, K_MAX = 3;
  localparam int LAT = 1 + $clog2(T_ID);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ld_valid = 0, ld_ready;
  buf_e              ld_buf = BUF_IN;
  logic [ADDR_W-1:0] ld_addr = '0;
  fxp_t              ld_data = '0;
  logic              start = 0, busy, done;
  tile_cmd_t         cmd = '0;
  logic [ADDR_W-1:0] rd_addr = '0;
  fxp_t              rd_data;

  conv_accel #(.T_OD(T_OD), .T_ID(T_ID), .T_OR(T_OR), .T_OC(T_OC), .T_IR(T_IR), .T_IC(T_IC),
               .K_MAX(K_MAX), .SILU_EN(1'b1)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0;

  longint in_m [T_ID][T_IR][T_IC];
  longint w_m  [T_OD][T_ID][K_MAX][K_MAX];
  longint b_m  [T_OD];
  longint ps   [T_OD][T_OR][T_OC];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input buf_e b, input int addr, input longint data);
    @(negedge clk);
    ld_valid = 1; ld_buf = b; ld_addr = ADDR_W'(addr); ld_data = fxp_t'(data);
    @(posedge clk);
    if (!ld_ready) begin
      failures++;
      $display("load while not ready");
    end
    #1 ld_valid = 0;
  endtask

  task automatic load_tile(input int k, input int wlo, input int whi, input bit new_bias);
    for (int id = 0; id < T_ID; id++)
      for (int r = 0; r < T_IR; r++)
        for (int c = 0; c < T_IC; c++) begin
          in_m[id][r][c] = rnd(-2048, 2047);
          load(BUF_IN, (id * T_IR + r) * T_IC + c, in_m[id][r][c]);
        end
    for (int od = 0; od < T_OD; od++)
      for (int id = 0; id < T_ID; id++)
        for (int ki = 0; ki < K_MAX; ki++)
          for (int kj = 0; kj < K_MAX; kj++) begin
            w_m[od][id][ki][kj] = (ki < k && kj < k) ? rnd(wlo, whi) : 0;
            if (ki < k && kj < k)
              load(BUF_WEIGHT, ((od * T_ID + id) * K_MAX + ki) * K_MAX + kj, w_m[od][id][ki][kj]);
          end
    if (new_bias)
      for (int od = 0; od < T_OD; od++) begin
        b_m[od] = rnd(-1024, 1023);
        load(BUF_BIAS, od, b_m[od]);
      end
  endtask

  // Reference for one tile, updating the partial sums.
  task automatic ref_tile(input tile_cmd_t t);
    int mode;
    mode = t.act ? 2 : 0;
    for (int od = 0; od < T_OD; od++)
      for (int r = 0; r < int'(t.rows); r++)
        for (int c = 0; c < int'(t.cols); c++) begin
          longint s;
          s = 0;
          for (int id = 0; id < T_ID; id++)
            for (int ki = 0; ki < int'(t.k); ki++)
              for (int kj = 0; kj < int'(t.k); kj++)
                s += w_m[od][id][ki][kj] * in_m[id][int'(t.s) * r + ki][int'(t.s) * c + kj];
          ps[od][r][c] = (t.first ? b_m[od] : ps[od][r][c]) + ref_round(s);
          if (t.last) begin
            if (ps[od][r][c] != ref_sat(ps[od][r][c])) n_sat++;
            ps[od][r][c] = ref_act(ref_sat(ps[od][r][c]), mode);
          end
        end
  endtask

  task automatic run(input tile_cmd_t t);
    int n, expc;
    @(negedge clk);
    cmd = t; start = 1;
    @(posedge clk);
    #1 start = 0;
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!done);
    expc = int'(t.rows) * int'(t.cols) * int'(t.k) * int'(t.k) + LAT + 2;
    checks++;
    if (n != expc) begin
      failures++;
      $display("tile took %0d cycles, expected %0d", n, expc);
    end
    ref_tile(t);
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("busy after done");
    end
  endtask

  task automatic check_out(input tile_cmd_t t, input string name);
    int bad;
    bad = 0;
    for (int od = 0; od < T_OD; od++)
      for (int r = 0; r < int'(t.rows); r++)
        for (int c = 0; c < int'(t.cols); c++) begin
          @(negedge clk);
          rd_addr = ADDR_W'((od * T_OR + r) * T_OC + c);
          @(negedge clk);
          checks++;
          if (longint'(rd_data) != ref_sat(ps[od][r][c])) begin
            failures++;
            bad++;
            if (bad < 5) $display("%s: od=%0d r=%0d c=%0d got %0d exp %0d", name, od, r, c, rd_data, ps[od][r][c]);
          end
        end
  endtask

  initial begin
    tile_cmd_t t;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. K=3, S=1, two input-depth tiles, SiLU on the last
    t = '0; t.rows = 8'd6; t.cols = 8'd8; t.k = 2'd3; t.s = 2'd1; t.first = 1; t.last = 0; t.act = 1;
    load_tile(3, -256, 255, 1);
    run(t);
    load_tile(3, -256, 255, 0);
    t.first = 0; t.last = 1;
    run(t);
    check_out(t, "k3s1 two tiles");

    // 2. K=1, S=2, one tile, no activation
    t = '0; t.rows = 8'd8; t.cols = 8'd8; t.k = 2'd1; t.s = 2'd2; t.first = 1; t.last = 1; t.act = 0;
    load_tile(1, -512, 511, 1);
    run(t);
    check_out(t, "k1s2");

    // 3. K=3, S=2, large weights: saturation, then SiLU
    t = '0; t.rows = 8'd8; t.cols = 8'd8; t.k = 2'd3; t.s = 2'd2; t.first = 1; t.last = 1; t.act = 1;
    load_tile(3, -8192, 8191, 1);
    run(t);
    check_out(t, "k3s2 saturating");

    checks++;
    if (n_sat == 0) begin
      failures++;
      $display("no result saturated");
    end
    $display("saturated results: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
