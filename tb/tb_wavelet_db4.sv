// tb_wavelet_db4: checks the DB4 de-noiser sample by sample against the
// reference filter bank, checks perfect reconstruction (output = input
// delayed by 3) with a zero threshold, checks that a large threshold
// removes a fast wiggle but keeps a step, and checks the one-clock output
// timing.  Input beats have random gaps.
module tb_wavelet_db4;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0;
  data_t in_data = '0, thresh = '0;
  logic out_valid;
  data_t out_data;
  int checks = 0, failures = 0;

  wavelet_db4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // run one sequence, return the outputs
  task automatic run(input iq_t x, input int th, output iq_t y);
    y = {};
    thresh = data_t'(th);
    for (int n = 0; n < x.size(); n++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 0;
        @(posedge clk);
        #1;
        check(out_valid === 1'b0, "no output without input");
      end
      in_valid <= 1; in_first <= (n == 0); in_data <= data_t'(x[n]);
      @(posedge clk);
      in_valid <= 0; in_first <= 0;
      #1;
      check(out_valid === 1'b1, "output one clock after input");
      y.push_back(int'(out_data));
    end
  endtask

  initial begin
    iq_t x, y, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int trial = 0; trial < 12; trial++) begin
      int th;
      x = {};
      // random walk around an angle, sometimes with steps
      begin
        int v;
        v = $urandom_range(0, 180 * 128);
        for (int n = 0; n < 60 + trial; n++) begin
          v += int'($urandom_range(0, 800)) - 400;
          if (trial % 3 == 2 && n == 30) v += 6000;
          if (v > 32000) v = 32000;
          if (v < -32000) v = -32000;
          x.push_back(v);
        end
      end
      th = (trial < 4) ? 0 : int'($urandom_range(0, 600));
      run(x, th, y);
      r = wavelet(x, th);
      for (int n = 0; n < x.size(); n++)
        check(y[n] == r[n], $sformatf("trial %0d n %0d got %0d want %0d", trial, n, y[n], r[n]));
      if (th == 0)
        for (int n = 3; n < x.size(); n++) begin
          int e;
          e = y[n] - x[n - 3];
          check(e <= 6 && e >= -6, $sformatf("reconstruction n %0d err %0d", n, e));
        end
    end
    // de-noising: a +-2 degree wiggle on a plateau is removed, the step kept
    begin
      int werr, rawerr;
      x = {};
      for (int n = 0; n < 64; n++)
        x.push_back(((n < 32) ? 30 * 128 : 90 * 128) + ((n % 2) ? 256 : -256));
      run(x, 600, y);
      werr = 0; rawerr = 0;
      for (int n = 8; n < 60; n++) begin
        int clean;
        if (n - 3 >= 28 && n - 3 <= 35) continue;
        clean = (n - 3 < 32) ? 30 * 128 : 90 * 128;
        werr   += (y[n] > clean) ? y[n] - clean : clean - y[n];
        rawerr += 256;
      end
      check(werr * 4 < rawerr, $sformatf("wiggle reduced %0d vs %0d", werr, rawerr));
      check(y[50] > 80 * 128 && y[10] < 40 * 128, "step kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
