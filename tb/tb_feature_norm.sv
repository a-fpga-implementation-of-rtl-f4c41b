// tb_feature_norm: checks the coefficient-to-Q1.7 normalisation over every
// 16-bit input value for the default shift and for shift 2.
`timescale 1ns/1ps
module tb_feature_norm;
  import fd_pkg::*;
  import tb_ref_pkg::*;

  coef_t coef;
  feat_t f4, f2;
  int checks = 0, failures = 0;

  feature_norm            u4 (.coef, .feat(f4));
  feature_norm #(.SHIFT(2)) u2 (.coef, .feat(f2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      coef = coef_t'(v);
      #1;
      checks += 2;
      if (int'(f4) != ref_norm(v, 4)) begin
        failures++;
        if (failures < 10) $display("shift 4, in %0d: %0d expected %0d", v, f4, ref_norm(v, 4));
      end
      if (int'(f2) != ref_norm(v, 2)) begin
        failures++;
        if (failures < 10) $display("shift 2, in %0d: %0d expected %0d", v, f2, ref_norm(v, 2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
