// maxpool2x2: 2x2, stride-2 max pooling of a serially arriving map.
//
// The H x W map with C channels arrives one pixel (all channels) per beat
// in raster order.  Pixels of an even row are cached in a one-row register
// buffer; on an odd row the left pixel of each pair is held, and when the
// right one arrives three comparators per channel give
// max(max(top-left, top-right), max(left, current)).  All channels are
// compared in parallel.  The output size OH x OW is a parameter: when H or
// W is odd, an output size rounded up keeps the edge window, which then
// takes the max of the pixels it has; rounded down drops it.
//
// Interface: valid/ready; a pooled pixel leaves one clock after the pixel
// that completes its window.  The input is stalled while an output waits.
//
// From the document: window, stride, serial input, local cache and three
// comparators.  The edge rule is this design's reading of the layer sizes
// (P2 drops the odd row, P3 keeps the odd column).
module maxpool2x2
  import gr_pkg::*;
#(
  parameter int H  = 50,
  parameter int W  = 12,
  parameter int C  = 4,
  parameter int OH = 25,
  parameter int OW = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  data_t [C-1:0]    in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output data_t [C-1:0]    out_data
);

  localparam int RW = $clog2(H + 1);
  localparam int CW = $clog2(W + 1);

  data_t [C-1:0] rowbuf [W];
  data_t [C-1:0] left;
  logic [RW-1:0] r;
  logic [CW-1:0] c;

  assign in_ready = !out_valid || out_ready;

  logic row_end, col_end, emit;
  always_comb begin
    row_end = r[0] || (32'(r) == H - 1);
    col_end = c[0] || (32'(c) == W - 1);
    emit    = row_end && col_end && (32'(r >> 1) < OH) && (32'(c >> 1) < OW);
  end

  function automatic data_t dmax(input data_t a, input data_t b);
    return (a > b) ? a : b;
  endfunction

  data_t [C-1:0] pooled;
  always_comb begin
    for (int k = 0; k < C; k++) begin
      data_t tl, tr, lf, m1, m2;
      tl = (r[0] && c[0]) ? rowbuf[c - 1'b1][k] : DATA_MIN;
      tr =  r[0]          ? rowbuf[c][k]        : DATA_MIN;
      lf =  c[0]          ? left[k]             : DATA_MIN;
      m1 = dmax(tl, tr);
      m2 = dmax(lf, in_data[k]);
      pooled[k] = dmax(m1, m2);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; c <= '0;
      out_valid <= 1'b0;
      out_data <= '0;
      left <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (!r[0]) rowbuf[c] <= in_data;
        left <= in_data;
        if (emit) begin
          out_valid <= 1'b1;
          out_data  <= pooled;
        end
        if (32'(c) == W - 1) begin
          c <= '0;
          r <= (32'(r) == H - 1) ? '0 : r + 1'b1;
        end else c <= c + 1'b1;
      end
    end
  end

endmodule
