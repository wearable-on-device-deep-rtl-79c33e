// tb_cm: loads random weight sets into the classifier, runs many random
// inputs and compares the output neuron and gesture number with the
// reference perceptron (Tanh fit, ReTanh, ReLU).  It checks that every
// inference takes exactly 21 clocks from start to done, that busy is high
// in between, and that the saturated fit interval, negative Tanh inputs
// and the ReTanh clamp all occur.
module tb_cm;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, w_we = 0, busy, done;
  data_t [3:0] x = '0;
  logic [6:0] w_addr = '0;
  data_t w_data = '0, y;
  logic [3:0] gesture;
  int sat_seen = 0, neg_seen = 0, clamp_seen = 0, nonzero_y = 0;

  cm dut (.*);

  // activation events seen inside the schedule
  always @(posedge clk) if (rst_n)
    if (dut.state == dut.S_A1 || dut.state == dut.S_A2)
      if (dut.k == 3'd2)
        for (int j = 0; j < 8; j++) begin
          if (dut.sat[j]) sat_seen++;
          if (dut.neg[j]) neg_seen++;
          if (dut.state == dut.S_A2 && dut.act[j] < 0) clamp_seen++;
        end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int w [128];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int set = 0; set < 6; set++) begin
      int span;
      span = (set % 2) ? 1024 : 300;   // Q7.8 weights up to +-4 or +-1.2
      for (int a = 0; a < 128; a++) begin
        w[a] = int'($urandom_range(0, 2 * span)) - span;
        w_we <= 1; w_addr <= 7'(a); w_data <= data_t'(w[a]);
        @(posedge clk);
      end
      w_we <= 0;
      for (int t = 0; t < 40; t++) begin
        int xi [4], ry, rg, lat;
        for (int i = 0; i < 4; i++) begin
          xi[i] = int'($urandom_range(0, 256)) - 128;   // rescaled features in [-1, 1]
          x[i] <= data_t'(xi[i]);
        end
        start <= 1;
        @(posedge clk);
        start <= 0;
        lat = 0;
        do begin
          @(posedge clk);
          #1;
          lat++;
          if (!done) check(busy, "busy while running");
        end while (!done && lat < 100);
        check(lat == 21, $sformatf("latency %0d", lat));
        mlp(xi, w, ry, rg);
        check(int'(y) == ry, $sformatf("set %0d t %0d y %0d want %0d", set, t, y, ry));
        check(int'(gesture) == rg, $sformatf("gesture %0d want %0d", gesture, rg));
        if (ry != 0) nonzero_y++;
        @(posedge clk);
        check(!busy, "idle after done");
      end
    end
    check(sat_seen > 0, "saturated interval used");
    check(neg_seen > 0, "negative Tanh input");
    check(clamp_seen > 0, "ReTanh clamp");
    check(nonzero_y > 0, "non-zero output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
