// tb_fem: sends three 50x12 windows of angle-like samples through the
// whole CNN and compares the four features of each with the reference
// (C1-P1-C2-P2-C3-P3-FC).  It also counts the clocks in which the first
// layer held its input back, which must happen.
module tb_fem;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, feat_valid;
  data_t in_data = '0;
  data_t [3:0] feat;
  int held = 0, nfeat = 0;

  fem dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) held++;
    if (feat_valid) nfeat++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 3; t++) begin
      iq_t x, r;
      int cyc;
      x = {};
      for (int i = 0; i < 600; i++)
        x.push_back((t == 0) ? int'($urandom_range(0, 3000))
                             : (20 + (i % 12) * 7 + ((i / 12) > 20 ? 30 : 0)) * 128 / (t + 1));
      r = fem(x);
      fork
        begin
          for (int i = 0; i < 600; i++) begin
            in_valid <= 1; in_data <= data_t'(x[i]);
            do @(posedge clk); while (!in_ready);
          end
          in_valid <= 0;
        end
      join_none
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!feat_valid && cyc < 20000);
      $display("win %0d after %0d clocks", t, cyc);
      for (int o = 0; o < 4; o++)
        check(int'(feat[o]) == r[o], $sformatf("win %0d feat %0d got %0d want %0d", t, o, feat[o], r[o]));
      wait fork;
      repeat (2) @(posedge clk);
    end
    check(nfeat == 3, $sformatf("feature strobes %0d", nfeat));
    check(held > 0, "input held back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
