// pm: preprocessing module of the accelerator.
//
// The processor writes a gesture record, MAX_FRAMES frames of NCH = 12
// angle samples at most, into the raw buffer (address = frame * 12 +
// channel).  On start the module
//   1. de-noises each channel in turn with wavelet_db4, one sample per
//      clock, and writes the result into the de-noised buffer; the channel
//      is extended by repeating its last sample so the filter delay of
//      three samples can drain, and its first sample preloads the filter;
//   2. streams the de-noised record, frame by frame, through
//      swab_segment, which returns the start of the SEG_LEN-frame window
//      that holds the movement;
//   3. sends that window to the feature extractor, time-major, one sample
//      per beat with valid/ready; frames past the end of a short record
//      repeat the last frame.
// busy is high from start until the last sample has left; done pulses
// then.  first_act, last_act and any_active report the segmentation.
// A record of N frames takes about 12 (N + 4) + 12 N + 600 clocks.
//
// Interface: wr_en/wr_addr/wr_data (raw buffer), start with nframes,
// wt_th (wavelet threshold, Q9.7) and seg_th (activity threshold,
// angle^2 units), the output stream, and seg_start for the processor.
//
// From the document: wavelet de-noising followed by segmentation into a
// window of one length for all channels, feeding the CNN.  This design's
// choices: the two buffers, the record length and the processing order.
module pm
  import gr_pkg::*;
#(
  parameter int MAX_FRAMES = 128
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            wr_en,
  input  logic [$clog2(MAX_FRAMES*NCH)-1:0] wr_addr,
  input  data_t                           wr_data,
  input  logic                            start,
  input  logic [$clog2(MAX_FRAMES+1)-1:0] nframes,
  input  data_t                           wt_th,
  input  logic [31:0]                     seg_th,
  output logic                            out_valid,
  input  logic                            out_ready,
  output data_t                           out_data,
  output logic                            out_last,
  output logic                            busy,
  output logic                            done,
  output logic [$clog2(MAX_FRAMES+1)-1:0] seg_start,
  output logic [$clog2(MAX_FRAMES+1)-1:0] first_act,
  output logic [$clog2(MAX_FRAMES+1)-1:0] last_act,
  output logic                            any_active
);

  localparam int DEPTH = MAX_FRAMES * NCH;
  localparam int AW = $clog2(DEPTH);
  localparam int FW = $clog2(MAX_FRAMES + 1);
  localparam int CHW = $clog2(NCH);

  data_t rawbuf [DEPTH];
  data_t denbuf [DEPTH];

  typedef enum logic [2:0] {P_IDLE, P_FILT, P_DRAIN, P_SEGGO, P_SEG, P_SEGWAIT, P_OUT} pstate_t;
  pstate_t st;

  logic [FW-1:0]  nfr;
  data_t          th;
  logic [CHW-1:0] ch;
  logic [FW:0]    n;          // sample index within a channel, up to nfr+2
  logic [AW:0]    sidx;       // linear index while segmenting
  logic [FW-1:0]  orow;
  logic [CHW-1:0] ocol;

  // ---------------------------------------------------------- wavelet
  logic  wv_in_valid, wv_first, wv_out_valid;
  data_t wv_in, wv_out;
  logic [FW:0] rd_frame;
  always_comb begin
    rd_frame    = (n >= (FW+1)'(nfr)) ? (FW+1)'(nfr - 1'b1) : n;
    wv_in_valid = (st == P_FILT);
    wv_first    = (n == 0);
    wv_in       = rawbuf[AW'(rd_frame * NCH + ch)];
  end

  wavelet_db4 u_wt (
    .clk, .rst_n, .in_valid(wv_in_valid), .in_first(wv_first), .in_data(wv_in),
    .thresh(th), .out_valid(wv_out_valid), .out_data(wv_out));

  // tags travelling with the one-clock filter
  logic [CHW-1:0] tag_ch;
  logic [FW:0]    tag_n;

  // ------------------------------------------------------ segmentation
  logic          sg_start, sg_valid, sg_done, sg_any;
  logic [FW-1:0] sg_seg, sg_first, sg_last;
  assign sg_start = (st == P_SEGGO);
  assign sg_valid = (st == P_SEG);

  swab_segment #(.NCHAN(NCH), .SEGL(SEG_LEN), .MAX_FRAMES(MAX_FRAMES)) u_seg (
    .clk, .rst_n, .start(sg_start), .nframes(nfr), .seg_th,
    .in_valid(sg_valid), .in_data(denbuf[sidx[AW-1:0]]),
    .done(sg_done), .seg_start(sg_seg), .first_act(sg_first), .last_act(sg_last),
    .any_active(sg_any));

  // ------------------------------------------------------------ output
  logic [FW:0] out_frame;
  always_comb begin
    out_frame = (FW+1)'(seg_start) + (FW+1)'(orow);
    if (out_frame >= (FW+1)'(nfr)) out_frame = (FW+1)'(nfr - 1'b1);
  end
  assign out_valid = (st == P_OUT);
  assign out_data  = denbuf[AW'(out_frame * NCH + ocol)];
  assign out_last  = (st == P_OUT) && (32'(orow) == SEG_LEN - 1) && (32'(ocol) == NCH - 1);
  assign busy      = (st != P_IDLE);

  always_ff @(posedge clk) begin
    if (wr_en) rawbuf[wr_addr] <= wr_data;
    if (wv_out_valid && tag_n >= 3)
      denbuf[AW'(32'(tag_n - 3'd3) * NCH + 32'(tag_ch))] <= wv_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= P_IDLE; nfr <= '0; th <= '0; ch <= '0; n <= '0; sidx <= '0;
      orow <= '0; ocol <= '0; tag_ch <= '0; tag_n <= '0;
      seg_start <= '0; done <= 1'b0;
      first_act <= '0; last_act <= '0; any_active <= 1'b0;
    end else begin
      done   <= 1'b0;
      tag_ch <= ch;
      tag_n  <= n;
      unique case (st)
        P_IDLE: if (start && nframes != 0) begin
          nfr <= nframes; th <= wt_th; ch <= '0; n <= '0;
          st <= P_FILT;
        end
        P_FILT: begin
          if (n == (FW+1)'(nfr) + 2) begin
            n <= '0;
            if (32'(ch) == NCH - 1) st <= P_DRAIN;
            else ch <= ch + 1'b1;
          end else n <= n + 1'b1;
        end
        P_DRAIN: st <= P_SEGGO;
        P_SEGGO: begin sidx <= '0; st <= P_SEG; end
        P_SEG: begin
          if (sidx == (AW+1)'(nfr * NCH - 1)) st <= P_SEGWAIT;
          sidx <= sidx + 1'b1;
        end
        P_SEGWAIT: if (sg_done) begin
          seg_start <= sg_seg;
          first_act <= sg_first;
          last_act  <= sg_last;
          any_active <= sg_any;
          orow <= '0; ocol <= '0;
          st <= P_OUT;
        end
        P_OUT: if (out_ready) begin
          if (32'(ocol) == NCH - 1) begin
            ocol <= '0;
            if (32'(orow) == SEG_LEN - 1) begin
              st <= P_IDLE;
              done <= 1'b1;
            end else orow <= orow + 1'b1;
          end else ocol <= ocol + 1'b1;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

endmodule
