// tb_gcn_stack: the ten fully connected layers of the GCN part run back to
// back on the full-size region with all activations kept on chip. The GCN
// module is loaded, one 64-row x 64-feature input tile is loaded once, and
// then for each layer only weights and biases are loaded: the layer runs
// (Sigmoid on all but the last, which has 16 outputs and no activation) and
// its result is handed to the next layer by a feedback copy. Only the final
// 64x16 result is read back and compared with the ten layers evaluated here.
// Layer widths are this testbench's choice.
module tb_gcn_stack;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 64, LAYERS = 10, LAST_W = 16;
  localparam int LAT = 1 + $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              reconfig = 0;
  rm_e               rm_sel = RM_GCN, rm_loaded;
  logic              rm_valid;
  logic              ld_valid = 0, ld_ready;
  buf_e              ld_buf = BUF_IN;
  logic [ADDR_W-1:0] ld_addr = '0;
  fxp_t              ld_data = '0;
  logic              start = 0, busy, done;
  tile_cmd_t         cmd = '0;
  logic [ADDR_W-1:0] rd_addr = '0;
  fxp_t              rd_data;

  pr_region_top dut (.*);

  int checks = 0, failures = 0, n_copies = 0;

  longint x [N][N];   // activations [row][feature]
  longint w [N][N];
  longint b [N];

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input buf_e bf, input int addr, input longint data);
    @(negedge clk);
    ld_valid = 1; ld_buf = bf; ld_addr = ADDR_W'(addr); ld_data = fxp_t'(data);
    @(posedge clk);
    #1 ld_valid = 0;
  endtask

  task automatic run(input tile_cmd_t t, input int expc);
    int n;
    @(negedge clk);
    cmd = t; start = 1;
    @(posedge clk);
    #1 start = 0;
    n = 0;
    do begin
      @(posedge clk);
      n++;
    end while (!done);
    checks++;
    if (n != expc) begin
      failures++;
      $display("command took %0d cycles, expected %0d", n, expc);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    reconfig = 1;
    repeat (16) @(negedge clk);
    reconfig = 0;
    while (!ld_ready) @(negedge clk);

    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        x[r][c] = rnd(-2048, 2047);
        load(BUF_IN, r * N + c, x[r][c]);
      end

    for (int l = 0; l < LAYERS; l++) begin
      tile_cmd_t t;
      int width;
      bit last_layer;
      longint y [N][N];
      last_layer = (l == LAYERS - 1);
      width = last_layer ? LAST_W : N;
      for (int d = 0; d < N; d++) begin
        b[d] = rnd(-256, 255);
        load(BUF_BIAS, d, b[d]);
        for (int c = 0; c < N; c++) begin
          w[d][c] = rnd(-128, 127);
          load(BUF_WEIGHT, d * N + c, w[d][c]);
        end
      end
      t = '0; t.rows = 8'(N); t.cols = 8'(width); t.first = 1; t.last = 1; t.act = !last_layer;
      run(t, N * width + LAT + 2);
      for (int r = 0; r < N; r++)
        for (int d = 0; d < width; d++) begin
          longint s;
          s = 0;
          for (int c = 0; c < N; c++) s += w[d][c] * x[r][c];
          y[r][d] = ref_act(ref_sat(b[d] + ref_round(s)), last_layer ? 0 : 1);
        end
      if (!last_layer) begin
        t = '0; t.rows = 8'(N); t.cols = 8'(N); t.feedback = 1;
        run(t, N * N + 1);
        n_copies++;
      end
      for (int r = 0; r < N; r++)
        for (int d = 0; d < width; d++) x[r][d] = y[r][d];
    end

    for (int r = 0; r < N; r++)
      for (int d = 0; d < LAST_W; d++) begin
        @(negedge clk);
        rd_addr = ADDR_W'(r * N + d);
        @(negedge clk);
        checks++;
        if (longint'(rd_data) != x[r][d]) begin
          failures++;
          if (failures < 5) $display("r=%0d d=%0d got %0d exp %0d", r, d, rd_data, x[r][d]);
        end
      end
    checks++;
    if (n_copies != LAYERS - 1) failures++;
    $display("layers=%0d on-chip hand-overs=%0d", LAYERS, n_copies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
