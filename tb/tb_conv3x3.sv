// tb_conv3x3: runs two convolution layers, the first CNN layer at its
// real size (50x12, 1 -> 4 channels) and a small multi-channel one (7x5,
// 4 -> 6 channels, odd sizes), each on two maps back to back, with random
// input gaps and random output back-pressure, and compares every output
// pixel with the reference convolution (padding 180, ReLU).  It also
// checks that an output pixel costs about CIN + 2 clocks when nothing stalls.
module tb_conv3x3;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
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

  // layer A: 50x12x1 -> 4
  logic a_iv = 0, a_ir, a_ov, a_or = 0;
  data_t [0:0] a_id = '0;
  data_t [3:0] a_od;
  conv3x3 #(.H(50), .W(12), .CIN(1), .COUT(4), .LAYER(1)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
    .out_valid(a_ov), .out_ready(a_or), .out_data(a_od));

  // layer B: 7x5x4 -> 6
  logic b_iv = 0, b_ir, b_ov, b_or = 0;
  data_t [3:0] b_id = '0;
  data_t [5:0] b_od;
  conv3x3 #(.H(7), .W(5), .CIN(4), .COUT(6), .LAYER(2)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od));

  iq_t xa, xb;
  bit gaps;
  bit done_a, done_b;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      gaps = (pass != 2);
      xa = {}; xb = {};
      for (int i = 0; i < 50 * 12; i++) xa.push_back($urandom_range(0, 200 * 128));
      for (int i = 0; i < 7 * 5 * 4; i++) xb.push_back($urandom_range(0, 40 * 128));
      done_a = 0; done_b = 0;
      fork
        // drivers
        begin
          for (int p = 0; p < 600; p++) begin
            while (gaps && $urandom_range(0, 4) == 0) begin a_iv <= 0; @(posedge clk); end
            a_iv <= 1; a_id[0] <= data_t'(xa[p]);
            do @(posedge clk); while (!a_ir);
          end
          a_iv <= 0;
        end
        begin
          for (int p = 0; p < 35; p++) begin
            while (gaps && $urandom_range(0, 4) == 0) begin b_iv <= 0; @(posedge clk); end
            b_iv <= 1;
            for (int c = 0; c < 4; c++) b_id[c] <= data_t'(xb[p * 4 + c]);
            do @(posedge clk); while (!b_ir);
          end
          b_iv <= 0;
        end
        // monitors
        begin
          iq_t r;
          int cyc0, cyc;
          r = conv(xa, 50, 12, 1, 4, 1);
          cyc0 = 0;
          for (int p = 0; p < 600; p++) begin
            a_or <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
            @(posedge clk);
            cyc0++;
            while (!(a_ov && a_or)) begin
              a_or <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
              @(posedge clk);
              cyc0++;
            end
            for (int co = 0; co < 4; co++)
              check(int'(a_od[co]) == r[p * 4 + co],
                    $sformatf("A pix %0d ch %0d got %0d want %0d", p, co, a_od[co], r[p * 4 + co]));
          end
          a_or <= 0;
          cyc = cyc0;
          if (!gaps) check(cyc <= 600 * 3 + 120, $sformatf("A took %0d clocks", cyc));
          done_a = 1;
        end
        begin
          iq_t r;
          int cyc;
          r = conv(xb, 7, 5, 4, 6, 2);
          cyc = 0;
          for (int p = 0; p < 35; p++) begin
            b_or <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
            @(posedge clk);
            cyc++;
            while (!(b_ov && b_or)) begin
              b_or <= gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
              @(posedge clk);
              cyc++;
            end
            for (int co = 0; co < 6; co++)
              check(int'(b_od[co]) == r[p * 6 + co],
                    $sformatf("B pix %0d ch %0d got %0d want %0d", p, co, b_od[co], r[p * 6 + co]));
          end
          b_or <= 0;
          if (!gaps) check(cyc <= 35 * 6 + 25, $sformatf("B took %0d clocks", cyc));
          done_b = 1;
        end
      join
      repeat (5) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
