// tb_gcn_accel: drives a small gcn_accel (8x8x8 tiles) through two fully
// connected layers and checks them against a reference computed here:
//   layer 1 over two column tiles (first, then last with Sigmoid),
//   an on-chip hand-over (feedback copy of the output into the input buffer),
//   layer 2 on a partial tile (6 rows, 5 output depths) reading that input.
// Compute tiles must take rows*cols + LAT + 2 cycles, the copy rows*cols + 1.
module tb_gcn_accel;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  localparam int T_ROW = 8, T_COL = 8, T_DEP = 8;
  localparam int LAT = 1 + $clog2(T_COL);

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

  gcn_accel #(.T_ROW(T_ROW), .T_COL(T_COL), .T_DEP(T_DEP)) dut (.*);

  int checks = 0, failures = 0;

  longint in_m [T_ROW][T_COL];
  longint w_m  [T_DEP][T_COL];
  longint b_m  [T_DEP];
  longint ps   [T_ROW][T_DEP];

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic load_inputs();
    for (int r = 0; r < T_ROW; r++)
      for (int c = 0; c < T_COL; c++) begin
        in_m[r][c] = rnd(-2048, 2047);
        load(BUF_IN, r * T_COL + c, in_m[r][c]);
      end
  endtask

  task automatic load_weights(input bit new_bias);
    for (int d = 0; d < T_DEP; d++)
      for (int c = 0; c < T_COL; c++) begin
        w_m[d][c] = rnd(-512, 511);
        load(BUF_WEIGHT, d * T_COL + c, w_m[d][c]);
      end
    if (new_bias)
      for (int d = 0; d < T_DEP; d++) begin
        b_m[d] = rnd(-1024, 1023);
        load(BUF_BIAS, d, b_m[d]);
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
    expc = int'(t.rows) * int'(t.cols) + (t.feedback ? 1 : LAT + 2);
    checks++;
    if (n != expc) begin
      failures++;
      $display("command took %0d cycles, expected %0d", n, expc);
    end
    if (t.feedback) begin
      for (int r = 0; r < int'(t.rows); r++)
        for (int d = 0; d < int'(t.cols); d++) in_m[r][d] = ref_sat(ps[r][d]);
    end else begin
      for (int r = 0; r < int'(t.rows); r++)
        for (int d = 0; d < int'(t.cols); d++) begin
          longint s;
          s = 0;
          for (int c = 0; c < T_COL; c++) s += w_m[d][c] * in_m[r][c];
          ps[r][d] = (t.first ? b_m[d] : ps[r][d]) + ref_round(s);
          if (t.last) ps[r][d] = ref_act(ref_sat(ps[r][d]), t.act ? 1 : 0);
        end
    end
  endtask

  task automatic check_out(input tile_cmd_t t, input string name);
    int bad;
    bad = 0;
    for (int r = 0; r < int'(t.rows); r++)
      for (int d = 0; d < int'(t.cols); d++) begin
        @(negedge clk);
        rd_addr = ADDR_W'(r * T_DEP + d);
        @(negedge clk);
        checks++;
        if (longint'(rd_data) != ref_sat(ps[r][d])) begin
          failures++;
          bad++;
          if (bad < 5) $display("%s: r=%0d d=%0d got %0d exp %0d", name, r, d, rd_data, ps[r][d]);
        end
      end
  endtask

  initial begin
    tile_cmd_t t;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // layer 1, column tile 0
    load_inputs();
    load_weights(1);
    t = '0; t.rows = 8'(T_ROW); t.cols = 8'(T_DEP); t.first = 1; t.last = 0; t.act = 1;
    run(t);
    // layer 1, column tile 1, Sigmoid
    load_inputs();
    load_weights(0);
    t.first = 0; t.last = 1;
    run(t);
    check_out(t, "layer1");

    // hand the result to the next layer on chip
    t = '0; t.rows = 8'(T_ROW); t.cols = 8'(T_DEP); t.feedback = 1;
    run(t);

    // layer 2 on a partial tile, no activation
    load_weights(1);
    t = '0; t.rows = 8'd6; t.cols = 8'd5; t.first = 1; t.last = 1; t.act = 0;
    run(t);
    check_out(t, "layer2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
