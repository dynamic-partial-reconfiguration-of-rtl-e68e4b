// tb_mac_tree: streams random vectors into two trees (N=16 and N=5, the
// latter not a power of two), one pair per cycle with random gaps, and
// checks every sum and its latency of 1 + ceil(log2 N) cycles.
module tb_mac_tree;
  import tb_ref_pkg::*;

  localparam int NA = 16, NB = 5;
  localparam int LA = 1 + $clog2(NA), LB = 1 + $clog2(NB);
  localparam int NV = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [15:0] a1 [NA], b1 [NA], a2 [NB], b2 [NB];
  logic               v_in;
  logic               v1, v2;
  logic signed [35:0] s1;
  logic signed [34:0] s2;
  int checks = 0, failures = 0;
  int cyc = 0;

  mac_tree #(.N(NA), .IN_W(16)) dut1 (.clk, .rst_n, .in_valid(v_in), .a(a1), .b(b1), .out_valid(v1), .sum(s1));
  mac_tree #(.N(NB), .IN_W(16)) dut2 (.clk, .rst_n, .in_valid(v_in), .a(a2), .b(b2), .out_valid(v2), .sum(s2));

  longint exp1 [NV], exp2 [NV];
  int     t_in [NV];
  int     nin = 0, nout1 = 0, nout2 = 0;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(posedge clk) begin
    if (rst_n && v1) begin
      checks++;
      if (s1 != exp1[nout1] || cyc - t_in[nout1] != LA) begin
        failures++;
        $display("tree16 #%0d: sum %0d exp %0d, latency %0d", nout1, s1, exp1[nout1], cyc - t_in[nout1]);
      end
      nout1++;
    end
    if (rst_n && v2) begin
      checks++;
      if (s2 != exp2[nout2] || cyc - t_in[nout2] != LB) begin
        failures++;
        $display("tree5 #%0d: sum %0d exp %0d", nout2, s2, exp2[nout2]);
      end
      nout2++;
    end
  end

  initial begin
    v_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (nin < NV) begin
      @(negedge clk);
      v_in = ($urandom % 4) != 0;
      if (v_in) begin
        longint e1, e2;
        e1 = 0; e2 = 0;
        for (int i = 0; i < NA; i++) begin
          // extremes now and then
          a1[i] = (nin % 50 == 7) ? -16'sd32768 : 16'(rnd(-32768, 32767));
          b1[i] = (nin % 50 == 7) ? -16'sd32768 : 16'(rnd(-32768, 32767));
          e1 += longint'(a1[i]) * longint'(b1[i]);
        end
        for (int i = 0; i < NB; i++) begin
          a2[i] = 16'(rnd(-32768, 32767));
          b2[i] = 16'(rnd(-32768, 32767));
          e2 += longint'(a2[i]) * longint'(b2[i]);
        end
        exp1[nin] = e1; exp2[nin] = e2;
        t_in[nin] = cyc;  // value the checker sees at the sampling edge
        nin++;
      end
    end
    @(negedge clk) v_in = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout1 != NV || nout2 != NV) begin
      failures++;
      $display("output count %0d/%0d of %0d", nout1, nout2, NV);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
