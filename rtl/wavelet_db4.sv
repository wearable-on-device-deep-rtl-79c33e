// wavelet_db4: one-level DB4 wavelet de-noiser for one sample stream.
//
// The sample stream passes a quadrature-mirror filter bank built from the
// DB4 lifting constants s = 0.483, a0 = 1.732, a1 = -0.268:
//   analysis   G(z) = s(1 + a0 z^-1 - a0 a1 z^-2 + a1 z^-3)   (low pass)
//              H(z) = s(-a1 - a0 a1 z^-1 - a0 z^-2 + z^-3)    (high pass)
//   synthesis  Ghat(z) = H(-z),  Hhat(z) = -G(-z)
// Every second sample a new pair of coefficients (a, d) is formed from
// the last four samples.  The high-frequency coefficient d is hard
// thresholded (|d| < thresh gives 0, else d is kept), then the synthesis
// bank rebuilds the signal in polyphase form from the current and the
// previous pair, one output per input.  With thresh = 0 the output is the
// input delayed by three samples, within rounding.  The bank as given
// returns the negated signal, so the synthesis taps are stored negated.
//
// Interface: in_valid/in_data carry one Q9.7 sample per beat; in_first
// marks the first sample of a sequence and preloads the delay line with it
// (the signal is taken as constant before its start).  out_valid/out_data
// follow one clock later; output k is the de-noised sample k-3.
//
// From the document: the filter equations, the constants and the hard
// threshold.  This design's choices: one decomposition level, a threshold
// given as an input rather than computed from the median of |d|, Q2.14
// coefficients and round-to-nearest after every filter.
module wavelet_db4
  import gr_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_first,
  input  data_t in_data,
  input  data_t thresh,
  output logic  out_valid,
  output data_t out_data
);

  typedef logic signed [19:0] coefv_t;   // a, d in Q7 with head room

  data_t  x1, x2, x3;        // previous three samples (x1 newest)
  coefv_t a_cur, a_prev, d_cur, d_prev;
  logic   phase;             // 0: even sample index, 1: odd

  // delay line seen by this beat
  data_t  t0, t1, t2, t3;
  always_comb begin
    t0 = in_data;
    t1 = in_first ? in_data : x1;
    t2 = in_first ? in_data : x2;
    t3 = in_first ? in_data : x3;
  end

  // analysis, used on odd samples
  logic signed [39:0] acc_a, acc_d;
  coefv_t a_new, d_new, d_thr;
  always_comb begin
    acc_a = 40'(WT_G0) * t0 + 40'(WT_G1) * t1 + 40'(WT_G2) * t2 + 40'(WT_G3) * t3;
    acc_d = 40'(WT_H0) * t0 + 40'(WT_H1) * t1 + 40'(WT_H2) * t2 + 40'(WT_H3) * t3;
    a_new = coefv_t'((acc_a + 40'sd8192) >>> WT_Q);
    d_new = coefv_t'((acc_d + 40'sd8192) >>> WT_Q);
    if (d_new < 0) d_thr = (-d_new < coefv_t'(thresh)) ? '0 : d_new;
    else           d_thr = ( d_new < coefv_t'(thresh)) ? '0 : d_new;
  end

  // phase of this beat: in_first restarts at index 0 (even)
  logic odd;
  assign odd = in_first ? 1'b0 : phase;

  // on a first sample the pair history is that of a constant signal: the
  // delay line holds four copies of the sample, so a_new/d_thr are it
  coefv_t a_hist, d_hist;
  always_comb begin
    a_hist = in_first ? a_new : a_cur;
    d_hist = in_first ? d_thr : d_cur;
  end

  // synthesis
  logic signed [39:0] acc_y;
  always_comb begin
    if (odd)
      acc_y = 40'(WT_NGS0) * a_new  + 40'(WT_NGS2) * a_cur
            + 40'(WT_NHS0) * d_thr  + 40'(WT_NHS2) * d_cur;
    else
      acc_y = 40'(WT_NGS1) * a_hist + 40'(WT_NGS3) * (in_first ? a_hist : a_prev)
            + 40'(WT_NHS1) * d_hist + 40'(WT_NHS3) * (in_first ? d_hist : d_prev);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; x3 <= '0;
      a_cur <= '0; a_prev <= '0; d_cur <= '0; d_prev <= '0;
      phase <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x1 <= t0; x2 <= t1; x3 <= t2;
        phase <= ~odd;
        out_data <= sat16(48'((acc_y + 40'sd8192) >>> WT_Q));
        if (odd) begin
          a_prev <= a_cur;  a_cur <= a_new;
          d_prev <= d_cur;  d_cur <= d_thr;
        end else if (in_first) begin
          a_prev <= a_hist; a_cur <= a_hist;
          d_prev <= d_hist;  d_cur <= d_hist;
        end
      end
    end
  end

endmodule
