// tb_pm: writes gesture records into the preprocessing module, runs it,
// takes the 50x12 window with random back-pressure and compares every
// sample and the window start with the reference (wavelet de-noising of
// each channel, then segmentation).  Records: a normal one, one with the
// movement at the end (clamped window), a short one (window padded with
// the last frame), one without movement and one with a zero threshold.
module tb_pm;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en = 0, start = 0, out_valid, out_ready = 0, out_last, busy, done, any_active;
  logic [10:0] wr_addr = '0;
  data_t wr_data = '0, wt_th = '0, out_data;
  logic [7:0] nframes = '0, seg_start, first_act, last_act;
  logic [31:0] seg_th = '0;
  int stalls = 0;

  pm #(.MAX_FRAMES(128)) dut (.*);

  always @(posedge clk) if (out_valid && !out_ready) stalls++;

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
    int lens [5]  = '{128, 100, 40, 80, 128};
    int moves [5] = '{50, 85, 10, 500, 30};
    int ths [5]   = '{300, 300, 200, 300, 0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 5; t++) begin
      iq_t raw, win;
      int rs, rfa, rla, cyc;
      bit rany;
      raw = make_record(lens[t], moves[t], 11 + t);
      for (int i = 0; i < lens[t] * 12; i++) begin
        wr_en <= 1; wr_addr <= 11'(i); wr_data <= data_t'(raw[i]);
        @(posedge clk);
      end
      wr_en <= 0;
      win = preprocess(raw, lens[t], ths[t], 4000, rs, rfa, rla, rany);
      nframes <= 8'(lens[t]); wt_th <= data_t'(ths[t]); seg_th <= 32'd4000;
      start <= 1;
      @(posedge clk);
      start <= 0;
      #1;
      check(busy, "busy after start");
      cyc = 0;
      for (int i = 0; i < 600; i++) begin
        do begin
          out_ready <= ($urandom_range(0, 3) != 0);
          @(posedge clk);
          cyc++;
        end while (!(out_valid && out_ready));
        check(int'(out_data) == win[i], $sformatf("rec %0d sample %0d got %0d want %0d", t, i, out_data, win[i]));
        check(out_last == (i == 599), "last flag");
      end
      out_ready <= 0;
      check(int'(seg_start) == rs, $sformatf("rec %0d start %0d want %0d", t, seg_start, rs));
      check(any_active == rany, "activity flag");
      #1;
      check(!busy, "idle after the window");
      check(cyc < 12 * (lens[t] + 4) + 12 * lens[t] + 600 * 2 + 40, $sformatf("rec %0d took %0d clocks", t, cyc));
      @(posedge clk);
    end
    check(stalls > 0, "back-pressure seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
