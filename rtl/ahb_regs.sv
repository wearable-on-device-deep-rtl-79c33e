// ahb_regs: AHB-Lite slave that couples the accelerator to the processor.
//
// The accelerator sits directly on the processor's AHB-Lite bus.  The
// slave has zero wait states and answers OKAY; it takes 32-bit word
// transfers.  The address phase is registered and the write data are
// used in the data phase, as AHB-Lite pipelines them.  Read data are
// driven in the data phase from the registered address.
//
// Register map (byte offsets, bits 13:0 of HADDR):
//   0x000 CTRL      W   bit0 start PM+FEM run, bit1 start CM run (pulses)
//   0x004 STATUS    R   bit0 PM busy, bit1 features valid, bit2 result
//                       valid, bit3 CM busy
//   0x008 NFRAMES   RW  frames in the record
//   0x00C WT_TH     RW  wavelet threshold, Q9.7
//   0x010 SEG_TH    RW  segmentation threshold, angle^2
//   0x014 IRQ_EN    RW  bit0 on features valid, bit1 on result valid
//   0x018 SEG       R   [7:0] window start, [15:8] first active frame,
//                       [23:16] last active frame, bit24 activity seen
//   0x01C RESULT    R   [3:0] gesture number, [31:16] output neuron Q9.7
//   0x020-0x02C FEAT[0..3]  R  features of the last window, Q9.7
//   0x030-0x03C CM_IN[0..3] RW rescaled features for the CM, Q9.7
//   0x200-0x3FC CM weight memory, word k at 0x200 + 4k   W
//   0x2000-...  raw sample buffer, word (frame*12+channel)  W
// Starting a run clears the matching valid flag; the flags are set by
// the feature and result strobes of the datapath.
//
// From the document: direct coupling of the accelerator to the AHB bus of
// the Cortex-M0.  The map and the transfer rules are this design's own.
module ahb_regs
  import gr_pkg::*;
#(
  parameter int RAW_AW = 11
) (
  input  logic              HCLK,
  input  logic              HRESETn,
  input  logic              HSEL,
  input  logic [31:0]       HADDR,
  input  logic [1:0]        HTRANS,
  input  logic              HWRITE,
  input  logic [2:0]        HSIZE,
  input  logic [31:0]       HWDATA,
  input  logic              HREADY,
  output logic [31:0]       HRDATA,
  output logic              HREADYOUT,
  output logic              HRESP,
  // to the datapath
  output logic              pm_start,
  output logic              cm_start,
  output logic [7:0]        nframes,
  output data_t             wt_th,
  output logic [31:0]       seg_th,
  output logic              raw_we,
  output logic [RAW_AW-1:0] raw_addr,
  output data_t             raw_data,
  output logic              w_we,
  output logic [6:0]        w_addr,
  output data_t             w_data,
  output data_t [3:0]       cm_in,
  output logic              irq,
  // from the datapath
  input  logic              pm_busy,
  input  logic              cm_busy,
  input  logic              feat_strobe,
  input  data_t [3:0]       feat,
  input  logic              res_strobe,
  input  logic [3:0]        gesture,
  input  data_t             y,
  input  logic [7:0]        seg_start,
  input  logic [7:0]        first_act,
  input  logic [7:0]        last_act,
  input  logic              any_active
);

  logic        dp_wr, dp_rd;
  logic [13:0] dp_addr;
  logic [1:0]  irq_en;
  logic        feat_valid, res_valid;
  data_t [3:0] feat_r;
  logic [3:0]  gesture_r;
  data_t       y_r;

  wire accept = HSEL && HREADY && HTRANS[1];

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_wr <= 1'b0; dp_rd <= 1'b0; dp_addr <= '0;
    end else if (HREADY) begin
      dp_wr   <= accept && HWRITE;
      dp_rd   <= accept && !HWRITE;
      dp_addr <= HADDR[13:0];
    end
  end

  assign HREADYOUT = 1'b1;
  assign HRESP     = 1'b0;

  // write side
  wire ctrl_wr = dp_wr && dp_addr == 14'h000;
  assign pm_start = ctrl_wr && HWDATA[0];
  assign cm_start = ctrl_wr && HWDATA[1];
  assign raw_we   = dp_wr && dp_addr[13];
  assign raw_addr = RAW_AW'(dp_addr[12:2]);
  assign raw_data = data_t'(HWDATA[15:0]);
  assign w_we     = dp_wr && dp_addr[13:9] == 5'b00001;
  assign w_addr   = dp_addr[8:2];
  assign w_data   = data_t'(HWDATA[15:0]);

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      nframes <= '0; wt_th <= '0; seg_th <= '0; irq_en <= '0; cm_in <= '0;
      feat_valid <= 1'b0; res_valid <= 1'b0; feat_r <= '0; gesture_r <= '0; y_r <= '0;
    end else begin
      if (dp_wr) begin
        unique case (dp_addr)
          14'h008: nframes <= HWDATA[7:0];
          14'h00C: wt_th   <= data_t'(HWDATA[15:0]);
          14'h010: seg_th  <= HWDATA;
          14'h014: irq_en  <= HWDATA[1:0];
          14'h030: cm_in[0] <= data_t'(HWDATA[15:0]);
          14'h034: cm_in[1] <= data_t'(HWDATA[15:0]);
          14'h038: cm_in[2] <= data_t'(HWDATA[15:0]);
          14'h03C: cm_in[3] <= data_t'(HWDATA[15:0]);
          default: ;
        endcase
      end
      if (pm_start) feat_valid <= 1'b0;
      if (cm_start) res_valid  <= 1'b0;
      if (feat_strobe) begin feat_valid <= 1'b1; feat_r <= feat; end
      if (res_strobe)  begin res_valid  <= 1'b1; gesture_r <= gesture; y_r <= y; end
    end
  end

  assign irq = (irq_en[0] && feat_valid) || (irq_en[1] && res_valid);

  // read side
  always_comb begin
    HRDATA = '0;
    if (dp_rd) begin
      unique case (dp_addr)
        14'h004: HRDATA = {28'd0, cm_busy, res_valid, feat_valid, pm_busy};
        14'h008: HRDATA = {24'd0, nframes};
        14'h00C: HRDATA = {{16{wt_th[15]}}, wt_th};
        14'h010: HRDATA = seg_th;
        14'h014: HRDATA = {30'd0, irq_en};
        14'h018: HRDATA = {7'd0, any_active, last_act, first_act, seg_start};
        14'h01C: HRDATA = {y_r, 12'd0, gesture_r};
        14'h020: HRDATA = 32'(feat_r[0]);
        14'h024: HRDATA = 32'(feat_r[1]);
        14'h028: HRDATA = 32'(feat_r[2]);
        14'h02C: HRDATA = 32'(feat_r[3]);
        14'h030: HRDATA = 32'(cm_in[0]);
        14'h034: HRDATA = 32'(cm_in[1]);
        14'h038: HRDATA = 32'(cm_in[2]);
        14'h03C: HRDATA = 32'(cm_in[3]);
        default: HRDATA = '0;
      endcase
    end
  end

  // bus rules this slave relies on
  a_word: assert property (@(posedge HCLK) disable iff (!HRESETn)
                           accept |-> (HSIZE == 3'b010 && HADDR[1:0] == 2'b00))
          else $error("ahb_regs: only aligned word transfers are supported");
  a_ready: assert property (@(posedge HCLK) disable iff (!HRESETn) HREADYOUT && !HRESP);

endmodule
