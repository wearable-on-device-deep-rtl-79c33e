// tb_swab_segment: feeds synthetic records (still, movement, still) of
// several lengths and movement positions and checks the window start,
// the first and last active frames against the reference segmentation,
// including a record with no movement, a movement near the end (window
// clamped) and a record shorter than the window.
module tb_swab_segment;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, in_valid = 0, done, any_active;
  logic [7:0] nframes = '0, seg_start, first_act, last_act;
  logic [31:0] seg_th = '0;
  data_t in_data = '0;
  int clamp_seen = 0;

  swab_segment #(.MAX_FRAMES(128)) dut (.*);

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
    int lens [8]  = '{128, 100, 128, 80, 40, 128, 64, 90};
    int moves [8] = '{40, 30, 120, 10, 10, 200, 20, 60};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 8; t++) begin
      iq_t raw;
      int rs, rfa, rla, lat;
      bit rany;
      raw = make_record(lens[t], moves[t], t);
      rs = segment(raw, lens[t], 4000, rfa, rla, rany);
      nframes <= 8'(lens[t]); seg_th <= 32'd4000; start <= 1;
      @(posedge clk);
      start <= 0;
      for (int i = 0; i < lens[t] * 12; i++) begin
        while ($urandom_range(0, 5) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_data <= data_t'(raw[i]);
        @(posedge clk);
      end
      in_valid <= 0;
      lat = 0;
      #1;
      while (!done && lat < 10) begin @(posedge clk); #1; lat++; end
      check(done, "done after the last sample");
      check(int'(seg_start) == rs, $sformatf("rec %0d start %0d want %0d", t, seg_start, rs));
      check(any_active == rany, $sformatf("rec %0d any %0d", t, any_active));
      if (rany) begin
        check(int'(first_act) == rfa, $sformatf("rec %0d first %0d want %0d", t, first_act, rfa));
        check(int'(last_act) == rla, $sformatf("rec %0d last %0d want %0d", t, last_act, rla));
        if (rs == lens[t] - 50) clamp_seen++;
      end
      check((lens[t] <= 50) || (int'(seg_start) + 50 <= lens[t]), "window inside record");
      @(posedge clk);
    end
    check(clamp_seen > 0, "window clamped at the end of a record");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
