// tb_tanh_pwq: sweeps |x| over 0..6 in steps of one LSB, checks the
// selected coefficients against the fit table, and checks that the
// evaluated fit stays within 0.02 of tanh(x) everywhere.
module tb_tanh_pwq;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  data_t x_abs;
  coef_t c2, c1, c0;
  logic sat;
  int checks = 0, failures = 0;

  tanh_pwq dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int segs_seen [5];
    for (int t = 0; t <= 6 * 128; t++) begin
      int rc2, rc1, rc0;
      bit rsat;
      real xv, yv, err;
      x_abs = data_t'(t);
      #1;
      tanh_coef(t, rc2, rc1, rc0, rsat);
      checks++;
      if (int'(c2) != rc2 || int'(c1) != rc1 || int'(c0) != rc0 || sat != rsat) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d coef %0d %0d %0d %0d", t, c2, c1, c0, sat);
      end
      xv = t / 128.0;
      yv = sat ? 1.0 : (c2 * xv * xv + c1 * xv + c0) / 16384.0;
      err = yv - $tanh(xv);
      if (err < 0) err = -err;
      checks++;
      if (err > 0.02) begin
        failures++;
        if (failures < 5) $display("FAIL t=%0d fit %f tanh %f", t, yv, $tanh(xv));
      end
      segs_seen[(t <= 128) ? 0 : (t <= 256) ? 1 : (t <= 384) ? 2 : (t <= 512) ? 3 : 4]++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
