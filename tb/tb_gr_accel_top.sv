// tb_gr_accel_top: end-to-end test of the accelerator at its full size.
//
// The testbench plays the processor on the AHB-Lite bus.  It loads a set
// of classifier weights, then for each of several glove records: writes
// the raw samples, sets the thresholds, starts the preprocessing and CNN,
// waits for the feature interrupt, reads the four features, rescales them
// to [-1, 1] (x' = 2 (x - mean) / (max - min), as the processor does),
// writes them back, starts the classifier and reads the gesture.  Every
// feature, window start and gesture is compared with the reference chain
// of gr_ref_pkg.  Records cover a normal gesture, one at the end of the
// record (window clamped), a short record (window padded), a still hand
// (no activity) and a noisy record with a high wavelet threshold.
// It counts how often each mechanism occurred and fails if one never did:
// detail coefficients zeroed by the threshold, activity found, window
// clamped, short-record padding, PM->FEM back-pressure, the line buffer
// holding back an input row, the dropped odd row and the kept odd column in pooling, Tanh
// saturation, negative Tanh inputs, the ReTanh clamp, the interrupt.  The
// classifier must finish 21 clocks after its start.
module tb_gr_accel_top;
  import gr_pkg::*;
  import gr_ref_pkg::*;

  logic HCLK = 0, HRESETn = 0;
  always #5 HCLK = ~HCLK;
  logic HSEL = 0, HWRITE = 0, HREADY = 1;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [1:0] HTRANS = '0;
  logic [2:0] HSIZE = 3'b010;
  logic HREADYOUT, HRESP, irq;

  gr_accel_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------ mechanism counters
  int n_zeroed = 0, n_active = 0, n_clamp = 0, n_short = 0, n_bp = 0, n_lbstall = 0;
  int n_rowdrop = 0, n_colkeep = 0, n_sat = 0, n_neg = 0, n_clampre = 0, n_irq = 0;
  always @(posedge HCLK) if (HRESETn) begin
    if (dut.u_pm.u_wt.in_valid && dut.u_pm.u_wt.odd &&
        dut.u_pm.u_wt.d_new != 0 && dut.u_pm.u_wt.d_thr == 0) n_zeroed++;
    if (dut.s_valid && !dut.s_ready) n_bp++;
    if (dut.u_fem.u_c1.in_valid && !dut.u_fem.u_c1.in_done &&
        32'(dut.u_fem.u_c1.in_row) > 32'(dut.u_fem.u_c1.o_row) + 1) n_lbstall++;
    if (dut.u_fem.c2_v && dut.u_fem.c2_r && dut.u_fem.u_p2.r == 5'd24) n_rowdrop++;
    if (dut.u_fem.u_p3.in_valid && dut.u_fem.u_p3.in_ready && dut.u_fem.u_p3.emit &&
        !dut.u_fem.u_p3.c[0]) n_colkeep++;
    if ((dut.u_cm.state == dut.u_cm.S_A1 || dut.u_cm.state == dut.u_cm.S_A2) && dut.u_cm.k == 3'd2)
      for (int j = 0; j < 8; j++) begin
        if (dut.u_cm.sat[j]) n_sat++;
        if (dut.u_cm.neg[j]) n_neg++;
        if (dut.u_cm.state == dut.u_cm.S_A2 && dut.u_cm.act[j] < 0) n_clampre++;
      end
  end

  initial begin
    repeat (2000000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    HSEL <= 1; HTRANS <= 2'b10; HADDR <= a; HWRITE <= 1;
    @(posedge HCLK);
    HSEL <= 0; HTRANS <= 2'b00; HWRITE <= 0; HWDATA <= d;
    @(posedge HCLK);
    #1;
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] d);
    HSEL <= 1; HTRANS <= 2'b10; HADDR <= a; HWRITE <= 0;
    @(posedge HCLK);
    HSEL <= 0; HTRANS <= 2'b00;
    #1 d = HRDATA;
    @(posedge HCLK);
    #1;
  endtask

  localparam logic [31:0] BASE = 32'h4000_0000;

  initial begin
    int w [128];
    int lens [5]  = '{128, 110, 40, 96, 128};
    int moves [5] = '{45, 95, 8, 999, 60};
    int wths [5]  = '{256, 256, 128, 256, 2000};
    logic [31:0] d;
    repeat (3) @(posedge HCLK);
    HRESETn = 1;
    @(posedge HCLK);
    // classifier weights, Q7.8
    for (int a = 0; a < 128; a++) begin
      w[a] = int'($urandom_range(0, 1600)) - 800;
      wr(BASE + 32'h200 + 32'(a * 4), 32'(w[a]));
    end
    wr(BASE + 32'h14, 32'h1);   // interrupt on features
    for (int t = 0; t < 5; t++) begin
      iq_t raw, win, rf;
      int rs, rfa, rla, fe [4], xs [4], ry, rg, mean, mx, mn, lat;
      bit rany;
      raw = make_record(lens[t], moves[t], 100 + t);
      if (t == 4)   // strong sensor noise
        for (int i = 0; i < raw.size(); i++) raw[i] += ((i * 7919) % 601) - 300;
      for (int i = 0; i < lens[t] * 12; i++) wr(BASE + 32'h2000 + 32'(i * 4), 32'(raw[i]));
      wr(BASE + 32'h08, 32'(lens[t]));
      wr(BASE + 32'h0C, 32'(wths[t]));
      wr(BASE + 32'h10, 32'd4000);
      wr(BASE + 32'h00, 32'h1);
      win = preprocess(raw, lens[t], wths[t], 4000, rs, rfa, rla, rany);
      rf = fem(win);
      lat = 0;
      while (!irq && lat < 100000) begin @(posedge HCLK); #1; lat++; end
      check(irq, "feature interrupt");
      $display("rec %0d: %0d clocks from start to features", t, lat + 2);
      if (irq) n_irq++;
      rd(BASE + 32'h04, d); check(d[1] && !d[0], "features valid, idle");
      rd(BASE + 32'h18, d);
      check(int'(d[7:0]) == rs, $sformatf("rec %0d window start %0d want %0d", t, d[7:0], rs));
      check(d[24] == rany, "activity flag");
      if (rany) n_active++;
      if (rany && rs == lens[t] - 50) n_clamp++;
      if (lens[t] < 50) n_short++;
      for (int o = 0; o < 4; o++) begin
        rd(BASE + 32'h20 + 32'(o * 4), d);
        fe[o] = int'($signed(d));
        check(fe[o] == rf[o], $sformatf("rec %0d feature %0d got %0d want %0d", t, o, fe[o], rf[o]));
      end
      // processor rescaling to [-1, 1], Q9.7
      mx = fe[0]; mn = fe[0]; mean = 0;
      for (int o = 0; o < 4; o++) begin
        mean += fe[o];
        if (fe[o] > mx) mx = fe[o];
        if (fe[o] < mn) mn = fe[o];
      end
      mean = mean / 4;
      for (int o = 0; o < 4; o++) begin
        xs[o] = (mx == mn) ? 0 : ((fe[o] - mean) * 256) / (mx - mn);
        wr(BASE + 32'h30 + 32'(o * 4), 32'(xs[o]));
      end
      mlp(xs, w, ry, rg);
      // start the classifier and time it
      HSEL <= 1; HTRANS <= 2'b10; HADDR <= BASE; HWRITE <= 1;
      @(posedge HCLK);
      HSEL <= 0; HTRANS <= 2'b00; HWRITE <= 0; HWDATA <= 32'h2;
      @(posedge HCLK);   // start taken here
      #1;
      lat = 0;
      while (!dut.cm_done && lat < 100) begin @(posedge HCLK); #1; lat++; end
      check(lat == 21, $sformatf("classifier took %0d clocks", lat));
      @(posedge HCLK); #1;
      rd(BASE + 32'h1C, d);
      check(int'(d[3:0]) == rg, $sformatf("rec %0d gesture %0d want %0d", t, d[3:0], rg));
      check(int'($signed(d[31:16])) == ry, $sformatf("rec %0d output %0d want %0d", t, $signed(d[31:16]), ry));
      rd(BASE + 32'h04, d); check(d[2] && !d[3], "result valid");
      $display("rec %0d: frames %0d window %0d..%0d gesture %0d (y=%0d) features %0d %0d %0d %0d",
               t, lens[t], rs, rs + 49, rg, ry, fe[0], fe[1], fe[2], fe[3]);
    end
    $display("mechanisms: zeroed %0d active %0d clamp %0d short %0d backpressure %0d lbstall %0d rowdrop %0d colkeep %0d tanh_sat %0d tanh_neg %0d retanh_clamp %0d irq %0d",
             n_zeroed, n_active, n_clamp, n_short, n_bp, n_lbstall, n_rowdrop, n_colkeep, n_sat, n_neg, n_clampre, n_irq);
    check(n_zeroed > 0, "threshold zeroed coefficients");
    check(n_active > 0, "activity found");
    check(n_clamp > 0, "window clamped");
    check(n_short > 0, "short record");
    check(n_bp > 0, "PM to FEM back-pressure");
    check(n_lbstall > 0, "line buffer full: input row held back");
    check(n_rowdrop > 0, "pool odd row dropped");
    check(n_colkeep > 0, "pool odd column kept");
    check(n_sat > 0, "tanh saturation");
    check(n_neg > 0, "negative tanh input");
    check(n_clampre > 0, "ReTanh clamp");
    check(n_irq > 0, "interrupt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
