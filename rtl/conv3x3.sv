// conv3x3: one convolution layer of the feature extractor.
//
// Computes a 3x3, stride-1 convolution over an H x W map with CIN input
// and COUT output channels, "same" size output, border filled with the
// constant PAD (180 in the input's units), followed by ReLU.
//
// The input map arrives serially, one pixel (all CIN channels) per beat in
// raster order, and is kept in a register line buffer of three rows.  A
// pixel of row r+2 is only accepted once output row r is finished, so the
// three rows in the buffer always cover the window.  An output pixel is
// started as soon as the input pixel below and to its right has arrived.
// Its COUT kernels run in parallel (up to six in the document's network),
// each lane with nine multipliers for the 3x3 window; the input channels
// are taken one per clock (the serial part of the serial-parallel scheme),
// so each output pixel takes CIN clocks plus two (window check and hand-off).  The weight ROM
// is addressed by the input channel through a Gray-code counter, so one
// address bit toggles per step.
//
// Interface: valid/ready on both sides.  out_data holds COUT channels,
// Q9.7, saturated to 16 bits.
//
// From the document: window, stride, padding value, kernel counts,
// register line buffer, parallel kernels, ROM weights, ReLU and Gray-coded
// weight address.  This design's choices: number formats, weights from
// gr_pkg::cnn_w (the trained values are not published), per-channel
// serial accumulation.
module conv3x3
  import gr_pkg::*;
#(
  parameter int H     = 50,
  parameter int W     = 12,
  parameter int CIN   = 1,
  parameter int COUT  = 4,
  parameter int LAYER = 1,
  parameter int PAD   = 180
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  data_t [CIN-1:0]      in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output data_t [COUT-1:0]     out_data
);

  localparam int RW = $clog2(H + 1);
  localparam int CW = $clog2(W + 1);
  localparam data_t PADV = data_t'(PAD <<< FRAC);
  localparam int WSH = 6;   // weight fraction bits

  // ---------------------------------------------------------- weight ROM
  // indexed by the Gray code of the input channel
  localparam int NADDR = 1 << $clog2(CIN + 1);
  cw_t   wrom [NADDR][COUT][9];
  data_t brom [COUT];
  initial begin
    for (int a = 0; a < NADDR; a++)
      for (int co = 0; co < COUT; co++)
        for (int t = 0; t < 9; t++)
          wrom[a][co][t] = (int'(gray2bin(8'(a))) < CIN)
                         ? cnn_w(LAYER, co, int'(gray2bin(8'(a))), t) : cw_t'(0);
    for (int co = 0; co < COUT; co++) brom[co] = cnn_b(LAYER, co);
  end

  // --------------------------------------------------------- line buffer
  data_t [CIN-1:0] lb [3][W];
  logic [RW-1:0] in_row;
  logic [CW-1:0] in_col;
  logic          in_done;
  logic [RW-1:0] o_row;
  logic [CW-1:0] o_col;

  assign in_ready = !in_done && (32'(in_row) <= 32'(o_row) + 1);

  // is the window of (o_row, o_col) complete?
  logic [RW-1:0] need_r;
  logic [CW-1:0] need_c;
  logic          avail;
  always_comb begin
    need_r = (32'(o_row) + 1 < H) ? RW'(o_row + 1) : RW'(H - 1);
    need_c = (32'(o_col) + 1 < W) ? CW'(o_col + 1) : CW'(W - 1);
    avail  = in_done || (in_row > need_r) || (in_row == need_r && in_col > need_c);
  end

  // ------------------------------------------------------------- compute
  typedef enum logic [1:0] {S_WAIT, S_MAC, S_OUT} state_t;
  state_t state;
  logic [7:0] ci_gray;                 // Gray-coded input channel
  logic [7:0] ci;
  assign ci = gray2bin(ci_gray);

  logic signed [31:0] acc [COUT];

  // 3x3 window of channel ci with padding
  data_t win [9];
  always_comb begin
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++) begin
        int r, c;
        r = int'(o_row) + dr - 1;
        c = int'(o_col) + dc - 1;
        if (r < 0 || r >= H || c < 0 || c >= W)
          win[dr*3+dc] = PADV;
        else
          win[dr*3+dc] = lb[r % 3][c][ci[$clog2(CIN+1)-1:0]];
      end
  end

  logic signed [31:0] lane_sum [COUT];
  always_comb begin
    for (int co = 0; co < COUT; co++) begin
      lane_sum[co] = '0;
      for (int t = 0; t < 9; t++)
        lane_sum[co] += 32'(win[t]) * 32'(wrom[ci_gray[$clog2(CIN+1)-1:0]][co][t]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_row <= '0; in_col <= '0; in_done <= 1'b0;
      o_row <= '0; o_col <= '0;
      state <= S_WAIT; ci_gray <= '0;
      out_valid <= 1'b0; out_data <= '0;
      for (int co = 0; co < COUT; co++) acc[co] <= '0;
    end else begin
      // input side
      if (in_valid && in_ready) begin
        lb[int'(in_row) % 3][in_col] <= in_data;
        if (32'(in_col) == W - 1) begin
          in_col <= '0;
          in_row <= in_row + 1'b1;
          if (32'(in_row) == H - 1) in_done <= 1'b1;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
      // compute side
      unique case (state)
        S_WAIT: if (avail) begin
          state   <= S_MAC;
          ci_gray <= '0;
          for (int co = 0; co < COUT; co++) acc[co] <= 32'(brom[co]) <<< WSH;
        end
        S_MAC: begin
          for (int co = 0; co < COUT; co++) acc[co] <= acc[co] + lane_sum[co];
          if (32'(ci) == CIN - 1) state <= S_OUT;
          else                   ci_gray <= bin2gray(ci + 1'b1);
        end
        S_OUT: if (!out_valid || out_ready) begin
          out_valid <= 1'b1;
          for (int co = 0; co < COUT; co++)
            out_data[co] <= relu(sat16(48'((acc[co] + 32'sd32) >>> WSH)));
          state <= S_WAIT;
          if (32'(o_col) == W - 1) begin
            o_col <= '0;
            if (32'(o_row) == H - 1) begin
              // map finished: ready for the next one
              o_row <= '0; in_row <= '0; in_col <= '0; in_done <= 1'b0;
            end else o_row <= o_row + 1'b1;
          end else o_col <= o_col + 1'b1;
        end
        default: state <= S_WAIT;
      endcase
      if (out_valid && out_ready && !(state == S_OUT)) out_valid <= 1'b0;
    end
  end

endmodule
