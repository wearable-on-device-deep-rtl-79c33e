// tb_ahb_regs: drives the AHB-Lite slave as a bus master would, with
// back-to-back and idle-separated transfers, and checks: read-back of the
// configuration registers, the start pulses, the raw-buffer and weight
// write ports with their address mapping, the status flags set by the
// datapath strobes and cleared by a new start, the captured results, the
// interrupt enables, and that a transfer with HSEL low does nothing.
module tb_ahb_regs;
  import gr_pkg::*;

  logic HCLK = 0, HRESETn = 0;
  always #5 HCLK = ~HCLK;
  logic HSEL = 0, HWRITE = 0, HREADY = 1;
  logic [31:0] HADDR = '0, HWDATA = '0, HRDATA;
  logic [1:0] HTRANS = '0;
  logic [2:0] HSIZE = 3'b010;
  logic HREADYOUT, HRESP;

  logic pm_start, cm_start, raw_we, w_we, irq;
  logic [7:0] nframes;
  data_t wt_th, raw_data, w_data;
  logic [31:0] seg_th;
  logic [10:0] raw_addr;
  logic [6:0] w_addr;
  data_t [3:0] cm_in;
  logic pm_busy = 0, cm_busy = 0, feat_strobe = 0, res_strobe = 0, any_active = 1;
  data_t [3:0] feat = '0;
  logic [3:0] gesture = '0;
  data_t y = '0;
  logic [7:0] seg_start = 8'd17, first_act = 8'd40, last_act = 8'd61;

  ahb_regs #(.RAW_AW(11)) dut (.*);

  int checks = 0, failures = 0;
  int pm_pulses = 0, cm_pulses = 0;
  int raw_seen [int];
  int w_seen [int];
  always @(posedge HCLK) if (HRESETn) begin
    if (pm_start) pm_pulses++;
    if (cm_start) cm_pulses++;
    if (raw_we) raw_seen[int'(raw_addr)] = int'(raw_data);
    if (w_we) w_seen[int'(w_addr)] = int'(w_data);
  end

  initial begin
    repeat (20000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [31:0] a, input logic [31:0] d, input bit sel = 1);
    HSEL <= sel; HTRANS <= 2'b10; HADDR <= a; HWRITE <= 1;
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
    check(HREADYOUT && !HRESP, "OKAY, no wait");
    @(posedge HCLK);
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge HCLK);
    HRESETn = 1;
    @(posedge HCLK);
    wr(32'h4000_0008, 32'd96);
    wr(32'h4000_000C, 32'h0000_0123);
    wr(32'h4000_0010, 32'h0001_2345);
    wr(32'h4000_0014, 32'h3);
    rd(32'h4000_0008, d); check(d == 32'd96, "NFRAMES");
    check(nframes == 8'd96, "nframes out");
    rd(32'h4000_000C, d); check(d == 32'h123 && wt_th == 16'sh123, "WT_TH");
    rd(32'h4000_0010, d); check(d == 32'h12345 && seg_th == 32'h12345, "SEG_TH");
    // pipelined writes: address of the next overlaps data of this one
    HSEL <= 1; HTRANS <= 2'b10; HWRITE <= 1; HADDR <= 32'h4000_0030;
    @(posedge HCLK);
    HADDR <= 32'h4000_0034; HWDATA <= 32'h0000_0050;
    @(posedge HCLK);
    HADDR <= 32'h4000_0038; HWDATA <= 32'h0000_FFB0;
    @(posedge HCLK);
    HADDR <= 32'h4000_003C; HWDATA <= 32'h0000_0007;
    @(posedge HCLK);
    HSEL <= 0; HTRANS <= 2'b00; HWDATA <= 32'h0000_0080;
    @(posedge HCLK);
    #1;
    check(cm_in[0] == 16'sh50 && cm_in[1] == -16'sh50 && cm_in[2] == 16'sh7 && cm_in[3] == 16'sh80,
          "CM_IN pipelined writes");
    rd(32'h4000_0034, d); check(d == 32'hFFFF_FFB0, "CM_IN read back");
    // raw buffer and weights
    for (int i = 0; i < 20; i++) wr(32'h4000_2000 + 32'(i * 4 * 37), 32'(i * 11 + 5));
    for (int i = 0; i < 20; i++) check(raw_seen.exists(i * 37) && raw_seen[i * 37] == i * 11 + 5, $sformatf("raw %0d", i));
    for (int i = 0; i < 128; i += 9) wr(32'h4000_0200 + 32'(i * 4), 32'(i * 3 - 100));
    for (int i = 0; i < 128; i += 9) check(w_seen.exists(i) && w_seen[i] == i * 3 - 100, $sformatf("w %0d", i));
    // not selected: nothing happens
    wr(32'h4000_0008, 32'd5, 0);
    rd(32'h4000_0008, d); check(d == 32'd96, "HSEL low ignored");
    // start pulses and flags
    wr(32'h4000_0000, 32'h1);
    check(pm_pulses == 1 && cm_pulses == 0, "pm start pulse");
    pm_busy = 1;
    rd(32'h4000_0004, d); check(d[0] && !d[1], "pm busy");
    check(!irq, "no irq yet");
    feat = '{16'sd4, 16'sd3, 16'sd2, 16'sd1};
    @(negedge HCLK) feat_strobe = 1;
    @(negedge HCLK) feat_strobe = 0; pm_busy = 0;
    rd(32'h4000_0004, d); check(d[1] && !d[0], "features valid");
    check(irq, "irq on features");
    rd(32'h4000_0028, d); check(d == 32'd3, "FEAT[2]");
    rd(32'h4000_0018, d); check(d == {7'd0, 1'b1, 8'd61, 8'd40, 8'd17}, "SEG");
    wr(32'h4000_0000, 32'h2);
    check(cm_pulses == 1, "cm start pulse");
    gesture = 4'd7; y = 16'sd900;
    @(negedge HCLK) res_strobe = 1;
    @(negedge HCLK) res_strobe = 0;
    rd(32'h4000_001C, d); check(d[3:0] == 4'd7 && d[31:16] == 16'd900, "RESULT");
    rd(32'h4000_0004, d); check(d[2] && d[1], "result valid");
    wr(32'h4000_0014, 32'h2);
    wr(32'h4000_0000, 32'h1);
    rd(32'h4000_0004, d); check(!d[1] && d[2], "start clears features valid");
    check(irq, "irq on result only");
    wr(32'h4000_0000, 32'h2);
    check(!irq, "irq cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
