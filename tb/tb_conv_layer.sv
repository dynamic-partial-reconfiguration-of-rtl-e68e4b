// tb_conv_layer: one complete Conv2d layer on the full-size region, run the
// way a host would run it. Conv module 1 (8 x 16 lanes, 64x64 tiles) is
// loaded and the layer
//   I_d = 80 input maps of 66x66, O_d = 80 output maps of 64x64, K=3, S=1,
//   bias, SiLU
// is computed as 10 output-depth tiles x 4 spatial tiles (62+2 rows and
// columns) x 5 input-depth tiles. Each spatial tile loads only the input
// rows and columns it needs. The assembled 80x64x64 result is compared with a
// direct evaluation of the layer in the accelerator's number format (sums
// rounded once per group of 16 input maps). It is also compared with the
// exact layer rounded once, within 12 LSB (the rounding of five partial sums,
// amplified by the SiLU slope and its small step at 2.375), to show that
// tiling costs almost no accuracy. Every tile's cycle count is checked.
module tb_conv_layer;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  localparam int I_D = 80, O_D = 80, O_R = 64, K = 3, I_R = O_R + K - 1;
  localparam int T_OD = 8, T_ID = 16, T_OR = 64, T_IR = 64;
  localparam int LAT = 1 + $clog2(T_ID);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              reconfig = 0;
  rm_e               rm_sel = RM_CONV1, rm_loaded;
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

  int checks = 0, failures = 0, n_tiles = 0;

  longint in_l [I_D][I_R][I_R];
  longint w_l  [O_D][I_D][K][K];
  longint b_l  [O_D];
  longint got  [O_D][O_R][O_R];

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input buf_e b, input int addr, input longint data);
    @(negedge clk);
    ld_valid = 1; ld_buf = b; ld_addr = ADDR_W'(addr); ld_data = fxp_t'(data);
    @(posedge clk);
    #1 ld_valid = 0;
  endtask

  task automatic run(input tile_cmd_t t);
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
    if (n != int'(t.rows) * int'(t.cols) * K * K + LAT + 2) begin
      failures++;
      $display("tile took %0d cycles", n);
    end
    n_tiles++;
  endtask

  initial begin
    int starts [2];
    int sizes  [2];
    starts[0] = 0; sizes[0] = 62; starts[1] = 62; sizes[1] = O_R - 62;

    for (int id = 0; id < I_D; id++)
      for (int r = 0; r < I_R; r++)
        for (int c = 0; c < I_R; c++) in_l[id][r][c] = rnd(-2048, 2047);
    for (int od = 0; od < O_D; od++) begin
      b_l[od] = rnd(-512, 511);
      for (int id = 0; id < I_D; id++)
        for (int ki = 0; ki < K; ki++)
          for (int kj = 0; kj < K; kj++) w_l[od][id][ki][kj] = rnd(-64, 63);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    reconfig = 1;
    repeat (16) @(negedge clk);
    reconfig = 0;
    while (!ld_ready) @(negedge clk);

    // host loop: output-depth tile, spatial tile, input-depth tile
    for (int odt = 0; odt < O_D / T_OD; odt++)
      for (int sr = 0; sr < 2; sr++)
        for (int sc = 0; sc < 2; sc++) begin
          for (int idt = 0; idt < I_D / T_ID; idt++) begin
            tile_cmd_t t;
            for (int id = 0; id < T_ID; id++)
              for (int r = 0; r < sizes[sr] + K - 1; r++)
                for (int c = 0; c < sizes[sc] + K - 1; c++)
                  load(BUF_IN, (id * T_IR + r) * T_IR + c,
                       in_l[idt * T_ID + id][starts[sr] + r][starts[sc] + c]);
            for (int od = 0; od < T_OD; od++)
              for (int id = 0; id < T_ID; id++)
                for (int ki = 0; ki < K; ki++)
                  for (int kj = 0; kj < K; kj++)
                    load(BUF_WEIGHT, ((od * T_ID + id) * 3 + ki) * 3 + kj,
                         w_l[odt * T_OD + od][idt * T_ID + id][ki][kj]);
            if (idt == 0)
              for (int od = 0; od < T_OD; od++) load(BUF_BIAS, od, b_l[odt * T_OD + od]);
            t = '0;
            t.rows = 8'(sizes[sr]); t.cols = 8'(sizes[sc]); t.k = 2'(K); t.s = 2'd1;
            t.first = (idt == 0); t.last = (idt == I_D / T_ID - 1); t.act = 1;
            run(t);
          end
          for (int od = 0; od < T_OD; od++)
            for (int r = 0; r < sizes[sr]; r++)
              for (int c = 0; c < sizes[sc]; c++) begin
                @(negedge clk);
                rd_addr = ADDR_W'((od * T_OR + r) * T_OR + c);
                @(negedge clk);
                got[odt * T_OD + od][starts[sr] + r][starts[sc] + c] = longint'(rd_data);
              end
        end

    // reference: the layer evaluated directly
    begin
      int bad;
      longint maxdev;
      bad = 0; maxdev = 0;
      for (int od = 0; od < O_D; od++)
        for (int r = 0; r < O_R; r++)
          for (int c = 0; c < O_R; c++) begin
            longint grp, acc, exact, e, d;
            acc = b_l[od];
            exact = 0;
            for (int g = 0; g < I_D / T_ID; g++) begin
              grp = 0;
              for (int id = g * T_ID; id < (g + 1) * T_ID; id++)
                for (int ki = 0; ki < K; ki++)
                  for (int kj = 0; kj < K; kj++)
                    grp += w_l[od][id][ki][kj] * in_l[id][r + ki][c + kj];
              acc += ref_round(grp);
              exact += grp;
            end
            e = ref_silu(ref_sat(b_l[od] + ref_round(exact)));
            checks++;
            if (got[od][r][c] != ref_silu(ref_sat(acc))) begin
              failures++;
              bad++;
              if (bad < 5) $display("od=%0d r=%0d c=%0d got %0d exp %0d", od, r, c, got[od][r][c], ref_silu(ref_sat(acc)));
            end
            d = got[od][r][c] - e;
            if (d < 0) d = -d;
            if (d > maxdev) maxdev = d;
          end
      checks++;
      if (maxdev > 12) begin
        failures++;
        $display("tiled result deviates %0d LSB from the exact layer", maxdev);
      end
      checks++;
      if (n_tiles != (O_D / T_OD) * 4 * (I_D / T_ID)) failures++;
      $display("tiles=%0d, largest deviation from the exact layer %0d LSB", n_tiles, maxdev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
