// tb_pwl_act: sweeps every Q7.9 input through the activation unit in all
// three modes and compares with the reference Sigmoid/SiLU; also checks that
// the piecewise-linear Sigmoid stays within 0.02 of the exact function.
module tb_pwl_act;
  import fxp_pkg::*;
  import tb_ref_pkg::*;

  fxp_t x, y;
  act_e mode;
  int   checks = 0, failures = 0;

  pwl_act dut (.x(x), .mode(mode), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err, maxerr, exact;
    maxerr = 0.0;
    for (int m = 0; m < 3; m++) begin
      mode = act_e'(m);
      for (int v = -32768; v < 32768; v += 1) begin
        x = fxp_t'(v);
        #1;
        checks++;
        if (longint'(y) != ref_act(longint'(v), m)) begin
          failures++;
          if (failures < 10)
            $display("mismatch mode=%0d x=%0d y=%0d exp=%0d", m, v, y, ref_act(longint'(v), m));
        end
        if (m == 1) begin
          exact = 1.0 / (1.0 + $exp(-real'(v) / 512.0));
          err = real'(y) / 512.0 - exact;
          if (err < 0) err = -err;
          if (err > maxerr) maxerr = err;
        end
      end
    end
    checks++;
    if (maxerr > 0.02) begin
      failures++;
      $display("Sigmoid approximation error %f too large", maxerr);
    end
    $display("max Sigmoid error %f", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
