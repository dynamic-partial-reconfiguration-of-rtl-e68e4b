// tb_pr_region_top: end-to-end run of the reconfigurable region at its
// default (full) sizes. The region is reconfigured four times, once into
// each accelerator module, and each module runs full-size tiles:
//   GCN   : a 64x64x64 fully connected layer with Sigmoid, the on-chip
//           hand-over of its result, and a second layer reading it
//   conv 1: K=3, S=1, 62x62 output, 16 input maps in two depth tiles,
//           SiLU, with weights large enough to saturate some results
//   conv 2: K=3, S=2, 31x31 output, SiLU
//   conv 3: K=1, 64x64 output, 64 input maps; act requested but the module
//           has no SiLU, so the results are plain
// Every output word is compared with a reference computed here, and every
// compute tile must take rows*cols*K*K + LAT + 2 cycles. The isolation of
// the region before the first and during every reconfiguration is checked.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_pr_region_top;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

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

  int checks = 0, failures = 0;

  // mechanism counters
  int n_reconfig = 0, n_isolated = 0, n_sigmoid = 0, n_feedback = 0, n_accum = 0;
  int n_k3 = 0, n_k1 = 0, n_s2 = 0, n_silu = 0, n_nosilu = 0, n_sat = 0;

  // geometry of the module under test
  int T_OD, T_ID, T_OR, T_IR, LAT;
  bit HAS_SILU;

  longint in_m [64][64][64];       // conv: [id][r][c]; GCN: [0][r][c]
  longint w_m  [64][64][3][3];     // conv: [od][id][ki][kj]; GCN: [d][c][0][0]
  longint b_m  [64];
  longint ps   [64][64][64];       // conv: [od][r][c]; GCN: [0][r][d]

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic reconfigure(input rm_e m);
    @(negedge clk);
    rm_sel = m; reconfig = 1;
    repeat (16) begin
      @(negedge clk);
      if (!ld_ready && !busy && !done && !rm_valid) n_isolated++;
      else begin
        failures++;
        $display("region not isolated during reconfiguration");
      end
    end
    reconfig = 0;
    n_reconfig++;
    while (!ld_ready) @(negedge clk);
    expect_true(rm_valid && rm_loaded == m, "loaded module after reconfiguration");
  endtask

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

  task automatic run(input tile_cmd_t t, input int steps);
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
    expc = steps + (t.feedback ? 1 : LAT + 2);
    checks++;
    if (n != expc) begin
      failures++;
      $display("command took %0d cycles, expected %0d", n, expc);
    end
  endtask

  function automatic longint finish_val(input longint v, input tile_cmd_t t, input int mode);
    if (!t.last) return v;
    if (v != ref_sat(v)) n_sat++;
    return ref_act(ref_sat(v), mode);
  endfunction

  // ---------------------------------------------------------------- GCN
  task automatic gcn_load_inputs();
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++) begin
        in_m[0][r][c] = rnd(-2048, 2047);
        load(BUF_IN, r * 64 + c, in_m[0][r][c]);
      end
  endtask

  task automatic gcn_load_weights();
    for (int d = 0; d < 64; d++)
      for (int c = 0; c < 64; c++) begin
        w_m[d][c][0][0] = rnd(-256, 255);
        load(BUF_WEIGHT, d * 64 + c, w_m[d][c][0][0]);
      end
    for (int d = 0; d < 64; d++) begin
      b_m[d] = rnd(-1024, 1023);
      load(BUF_BIAS, d, b_m[d]);
    end
  endtask

  task automatic gcn_ref(input tile_cmd_t t);
    for (int r = 0; r < int'(t.rows); r++)
      for (int d = 0; d < int'(t.cols); d++) begin
        longint s;
        s = 0;
        for (int c = 0; c < 64; c++) s += w_m[d][c][0][0] * in_m[0][r][c];
        ps[0][r][d] = finish_val((t.first ? b_m[d] : ps[0][r][d]) + ref_round(s), t, t.act ? 1 : 0);
      end
  endtask

  task automatic gcn_check(input tile_cmd_t t, input string name);
    int bad;
    bad = 0;
    for (int r = 0; r < int'(t.rows); r++)
      for (int d = 0; d < int'(t.cols); d++) begin
        @(negedge clk);
        rd_addr = ADDR_W'(r * 64 + d);
        @(negedge clk);
        checks++;
        if (longint'(rd_data) != ref_sat(ps[0][r][d])) begin
          failures++;
          bad++;
          if (bad < 5) $display("%s: r=%0d d=%0d got %0d exp %0d", name, r, d, rd_data, ps[0][r][d]);
        end
      end
  endtask

  task automatic test_gcn();
    tile_cmd_t t;
    LAT = 1 + $clog2(64);
    gcn_load_inputs();
    gcn_load_weights();
    t = '0; t.rows = 8'd64; t.cols = 8'd64; t.first = 1; t.last = 1; t.act = 1;
    run(t, 64 * 64);
    gcn_ref(t);
    n_sigmoid++;
    gcn_check(t, "gcn layer 1");
    // hand-over: output depth d becomes input column d
    t = '0; t.rows = 8'd64; t.cols = 8'd64; t.feedback = 1;
    run(t, 64 * 64);
    for (int r = 0; r < 64; r++)
      for (int d = 0; d < 64; d++) in_m[0][r][d] = ref_sat(ps[0][r][d]);
    n_feedback++;
    gcn_load_weights();
    t = '0; t.rows = 8'd64; t.cols = 8'd64; t.first = 1; t.last = 1; t.act = 0;
    run(t, 64 * 64);
    gcn_ref(t);
    gcn_check(t, "gcn layer 2");
  endtask

  // --------------------------------------------------------------- conv
  task automatic conv_load(input int k, input int wlo, input int whi, input bit new_bias);
    for (int id = 0; id < T_ID; id++)
      for (int r = 0; r < T_IR; r++)
        for (int c = 0; c < T_IR; c++) begin
          in_m[id][r][c] = rnd(-2048, 2047);
          load(BUF_IN, (id * T_IR + r) * T_IR + c, in_m[id][r][c]);
        end
    for (int od = 0; od < T_OD; od++)
      for (int id = 0; id < T_ID; id++)
        for (int ki = 0; ki < 3; ki++)
          for (int kj = 0; kj < 3; kj++) begin
            w_m[od][id][ki][kj] = (ki < k && kj < k) ? rnd(wlo, whi) : 0;
            if (ki < k && kj < k)
              load(BUF_WEIGHT, ((od * T_ID + id) * 3 + ki) * 3 + kj, w_m[od][id][ki][kj]);
          end
    if (new_bias)
      for (int od = 0; od < T_OD; od++) begin
        b_m[od] = rnd(-1024, 1023);
        load(BUF_BIAS, od, b_m[od]);
      end
  endtask

  task automatic conv_tile(input tile_cmd_t t);
    int mode;
    run(t, int'(t.rows) * int'(t.cols) * int'(t.k) * int'(t.k));
    mode = (t.act && HAS_SILU) ? 2 : 0;
    for (int od = 0; od < T_OD; od++)
      for (int r = 0; r < int'(t.rows); r++)
        for (int c = 0; c < int'(t.cols); c++) begin
          longint s;
          s = 0;
          for (int id = 0; id < T_ID; id++)
            for (int ki = 0; ki < int'(t.k); ki++)
              for (int kj = 0; kj < int'(t.k); kj++)
                s += w_m[od][id][ki][kj] * in_m[id][int'(t.s) * r + ki][int'(t.s) * c + kj];
          ps[od][r][c] = finish_val((t.first ? b_m[od] : ps[od][r][c]) + ref_round(s), t, mode);
        end
    if (!t.first) n_accum++;
    if (t.k == 2'd3) n_k3++;
    if (t.k == 2'd1) n_k1++;
    if (t.s == 2'd2) n_s2++;
    if (t.last && t.act && HAS_SILU) n_silu++;
    if (t.last && t.act && !HAS_SILU) n_nosilu++;
  endtask

  task automatic conv_check(input tile_cmd_t t, input string name);
    int bad;
    bad = 0;
    for (int od = 0; od < T_OD; od++)
      for (int r = 0; r < int'(t.rows); r++)
        for (int c = 0; c < int'(t.cols); c++) begin
          @(negedge clk);
          rd_addr = ADDR_W'((od * T_OR + r) * T_OR + c);
          @(negedge clk);
          checks++;
          if (longint'(rd_data) != ref_sat(ps[od][r][c])) begin
            failures++;
            bad++;
            if (bad < 5) $display("%s: od=%0d r=%0d c=%0d got %0d exp %0d", name, od, r, c, rd_data, ps[od][r][c]);
          end
        end
  endtask

  function automatic tile_cmd_t conv_cmd(input int rows, input int k, input int s,
                                         input bit first, input bit last, input bit act);
    tile_cmd_t t;
    t = '0;
    t.rows = 8'(rows); t.cols = 8'(rows); t.k = 2'(k); t.s = 2'(s);
    t.first = first; t.last = last; t.act = act;
    return t;
  endfunction

  initial begin
    tile_cmd_t t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    expect_true(!rm_valid && !ld_ready && !busy, "region idle and isolated before the first configuration");

    // GCN module
    reconfigure(RM_GCN);
    test_gcn();

    // conv module 1: 8 x 16 lanes, 64x64 tiles, SiLU
    reconfigure(RM_CONV1);
    T_OD = 8; T_ID = 16; T_OR = 64; T_IR = 64; LAT = 1 + $clog2(16); HAS_SILU = 1;
    conv_load(3, -1024, 1023, 1);
    conv_tile(conv_cmd(62, 3, 1, 1, 0, 1));
    conv_load(3, -1024, 1023, 0);
    t = conv_cmd(62, 3, 1, 0, 1, 1);
    conv_tile(t);
    conv_check(t, "conv1 k3s1");

    // conv module 2: 32 x 4 lanes, 32x32 output, 64x64 input tiles, SiLU
    reconfigure(RM_CONV2);
    T_OD = 32; T_ID = 4; T_OR = 32; T_IR = 64; LAT = 1 + $clog2(4); HAS_SILU = 1;
    conv_load(3, -512, 511, 1);
    t = conv_cmd(31, 3, 2, 1, 1, 1);
    conv_tile(t);
    conv_check(t, "conv2 k3s2");

    // conv module 3: 3 x 64 lanes, no SiLU (detection head)
    reconfigure(RM_CONV3);
    T_OD = 3; T_ID = 64; T_OR = 64; T_IR = 64; LAT = 1 + $clog2(64); HAS_SILU = 0;
    conv_load(1, -256, 255, 1);
    t = conv_cmd(64, 1, 1, 1, 1, 1);
    conv_tile(t);
    conv_check(t, "conv3 k1");

    $display("reconfig=%0d isolated_cycles=%0d sigmoid=%0d feedback=%0d accumulate=%0d k3=%0d k1=%0d s2=%0d silu=%0d no_silu=%0d saturated=%0d",
             n_reconfig, n_isolated, n_sigmoid, n_feedback, n_accum, n_k3, n_k1, n_s2, n_silu, n_nosilu, n_sat);
    expect_true(n_reconfig == 4, "four reconfigurations");
    expect_true(n_isolated > 0, "isolation seen");
    expect_true(n_sigmoid > 0, "Sigmoid used");
    expect_true(n_feedback > 0, "on-chip hand-over used");
    expect_true(n_accum > 0, "depth-tile accumulation used");
    expect_true(n_k3 > 0 && n_k1 > 0, "both kernel sizes used");
    expect_true(n_s2 > 0, "stride 2 used");
    expect_true(n_silu > 0, "SiLU used");
    expect_true(n_nosilu > 0, "module without SiLU used");
    expect_true(n_sat > 0, "saturation happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
