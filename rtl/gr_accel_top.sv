// gr_accel_top: hand-gesture recognition accelerator for a Cortex-M0.
//
// The processor writes an IMU gesture record (up to 128 frames of 12
// angles from six sensors) over AHB-Lite and starts a run.  The
// preprocessing module (pm) de-noises every channel with a DB4 wavelet
// filter bank and cuts out a 50-frame window around the movement; the
// feature extraction module (fem), a three-layer CNN, turns the window
// into four features.  The processor reads them, rescales them to
// [-1, 1] and starts the classification module (cm), a 4-8-8-1
// perceptron that returns the gesture number in 21 clocks.  irq flags
// either result when enabled.
//
// Interface: one AHB-Lite slave port (see ahb_regs for the register map)
// and irq.  All logic runs on HCLK.
//
// From the document: the PM -> FEM -> processor rescaling -> CM flow and
// the direct AHB coupling.  The register map is this design's choice.
module gr_accel_top
  import gr_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic        HRESP,
  output logic        irq
);

  localparam int MAX_FRAMES = 128;
  localparam int RAW_AW = $clog2(MAX_FRAMES * NCH);

  logic              pm_start, cm_start, raw_we, w_we;
  logic [7:0]        nframes;
  data_t             wt_th, raw_data, w_data;
  logic [31:0]       seg_th;
  logic [RAW_AW-1:0] raw_addr;
  logic [6:0]        w_addr;
  data_t [3:0]       cm_in, feat;
  logic              pm_busy, pm_done, cm_busy, cm_done, feat_valid;
  logic [3:0]        gesture;
  data_t             y;
  logic [7:0]        seg_start, first_act, last_act;
  logic              any_active;

  logic  s_valid, s_ready, s_last;
  logic  fem_busy;
  data_t s_data;

  ahb_regs #(.RAW_AW(RAW_AW)) u_regs (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA, .HREADY,
    .HRDATA, .HREADYOUT, .HRESP,
    .pm_start, .cm_start, .nframes, .wt_th, .seg_th,
    .raw_we, .raw_addr, .raw_data, .w_we, .w_addr, .w_data, .cm_in, .irq,
    .pm_busy(pm_busy || fem_busy), .cm_busy, .feat_strobe(feat_valid), .feat,
    .res_strobe(cm_done), .gesture, .y,
    .seg_start, .first_act, .last_act, .any_active);

  pm #(.MAX_FRAMES(MAX_FRAMES)) u_pm (
    .clk(HCLK), .rst_n(HRESETn),
    .wr_en(raw_we), .wr_addr(raw_addr), .wr_data(raw_data),
    .start(pm_start), .nframes, .wt_th, .seg_th,
    .out_valid(s_valid), .out_ready(s_ready), .out_data(s_data), .out_last(s_last),
    .busy(pm_busy), .done(pm_done), .seg_start,
    .first_act, .last_act, .any_active);

  // the FEM is busy from the first window sample until its features leave
  always_ff @(posedge HCLK or negedge HRESETn)
    if (!HRESETn)                      fem_busy <= 1'b0;
    else if (feat_valid)               fem_busy <= 1'b0;
    else if (s_valid && s_ready)       fem_busy <= 1'b1;

  fem u_fem (
    .clk(HCLK), .rst_n(HRESETn),
    .in_valid(s_valid), .in_ready(s_ready), .in_data(s_data),
    .feat_valid, .feat);

  cm u_cm (
    .clk(HCLK), .rst_n(HRESETn), .start(cm_start), .x(cm_in),
    .w_we, .w_addr, .w_data, .busy(cm_busy), .done(cm_done), .y, .gesture);

endmodule
