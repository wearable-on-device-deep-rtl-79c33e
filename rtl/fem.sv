// fem: feature extraction module, the CNN of the accelerator.
//
// Chain of layers, each passing pixels serially to the next with
// valid/ready:
//   C1 conv 3x3, 1->4 channels, 50x12      P1 max 2x2 -> 25x6x4
//   C2 conv 3x3, 4->6 channels, 25x6       P2 max 2x2 -> 12x3x6
//   C3 conv 3x3, 6->6 channels, 12x3       P3 max 2x2 ->  6x2x6
//   FC 72 -> 4, ReLU
// The input is the 50 x 12 window of de-noised angle samples, time-major
// (row = frame, column = channel), one sample per beat.  feat_valid pulses
// once per window with the four features (Q9.7).
//
// From the document: layer sizes, kernel counts, 3x3 kernels, stride 1,
// 2x2 max pooling, padding value 180, ReLU and the 4-feature output.
// This design's choices: number formats and ROM weights (see gr_pkg).
module fem
  import gr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  data_t             in_data,
  output logic              feat_valid,
  output data_t [3:0]       feat
);

  logic c1_v, c1_r, p1_v, p1_r, c2_v, c2_r, p2_v, p2_r, c3_v, c3_r, p3_v, p3_r;
  data_t [3:0] c1_d, p1_d;
  data_t [5:0] c2_d, p2_d, c3_d, p3_d;

  conv3x3 #(.H(50), .W(12), .CIN(1), .COUT(4), .LAYER(1), .PAD(180)) u_c1 (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_data),
    .out_valid(c1_v), .out_ready(c1_r), .out_data(c1_d));

  maxpool2x2 #(.H(50), .W(12), .C(4), .OH(25), .OW(6)) u_p1 (
    .clk, .rst_n, .in_valid(c1_v), .in_ready(c1_r), .in_data(c1_d),
    .out_valid(p1_v), .out_ready(p1_r), .out_data(p1_d));

  conv3x3 #(.H(25), .W(6), .CIN(4), .COUT(6), .LAYER(2), .PAD(180)) u_c2 (
    .clk, .rst_n, .in_valid(p1_v), .in_ready(p1_r), .in_data(p1_d),
    .out_valid(c2_v), .out_ready(c2_r), .out_data(c2_d));

  maxpool2x2 #(.H(25), .W(6), .C(6), .OH(12), .OW(3)) u_p2 (
    .clk, .rst_n, .in_valid(c2_v), .in_ready(c2_r), .in_data(c2_d),
    .out_valid(p2_v), .out_ready(p2_r), .out_data(p2_d));

  conv3x3 #(.H(12), .W(3), .CIN(6), .COUT(6), .LAYER(3), .PAD(180)) u_c3 (
    .clk, .rst_n, .in_valid(p2_v), .in_ready(p2_r), .in_data(p2_d),
    .out_valid(c3_v), .out_ready(c3_r), .out_data(c3_d));

  maxpool2x2 #(.H(12), .W(3), .C(6), .OH(6), .OW(2)) u_p3 (
    .clk, .rst_n, .in_valid(c3_v), .in_ready(c3_r), .in_data(c3_d),
    .out_valid(p3_v), .out_ready(p3_r), .out_data(p3_d));

  fc_serial #(.NPIX(12), .C(6), .NOUT(4), .LAYER(4)) u_fc (
    .clk, .rst_n, .in_valid(p3_v), .in_ready(p3_r), .in_data(p3_d),
    .out_valid(feat_valid), .out_data(feat));

endmodule
