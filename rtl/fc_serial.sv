// fc_serial: fully connected layer with serial inputs and ReLU.
//
// The NPIX x C input values arrive as NPIX beats of C channels; the layer
// takes one channel per clock (in_ready is low while a beat's channels
// are worked through), so the input index is pixel * C + channel.  Each
// of the NOUT neurons has its own multiplier and accumulator, all working
// on the same input value in the same clock.  After the last input the
// sums are rounded, saturated and passed through ReLU, and out_valid
// pulses for one clock with all NOUT outputs.
//
// Weights (Q1.6) and biases (Q9.7) come from a ROM filled by gr_pkg.
//
// From the document: the FEM's full connection layer with 4 outputs and
// ReLU, built like the classifier's neurons.  This design's choices: one
// multiplier per neuron, serial order, number formats, ROM contents.
module fc_serial
  import gr_pkg::*;
#(
  parameter int NPIX  = 12,
  parameter int C     = 6,
  parameter int NOUT  = 4,
  parameter int LAYER = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  data_t [C-1:0]     in_data,
  output logic              out_valid,
  output data_t [NOUT-1:0]  out_data
);

  localparam int NIN = NPIX * C;
  localparam int IW  = $clog2(NIN + 1);
  localparam int KW  = $clog2(C + 1);
  localparam int WSH = 6;

  cw_t   wrom [NOUT][NIN];
  data_t brom [NOUT];
  initial begin
    for (int o = 0; o < NOUT; o++) begin
      for (int i = 0; i < NIN; i++) wrom[o][i] = cnn_w(LAYER, o, 0, i);
      brom[o] = cnn_b(LAYER, o);
    end
  end

  data_t [C-1:0] hold;
  logic          busy;          // working through the channels of hold
  logic [KW-1:0] k;
  logic [IW-1:0] idx;
  logic signed [31:0] acc [NOUT];

  assign in_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; k <= '0; idx <= '0; hold <= '0;
      out_valid <= 1'b0; out_data <= '0;
      for (int o = 0; o < NOUT; o++) acc[o] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy && in_valid) begin
        hold <= in_data;
        busy <= 1'b1;
        k    <= '0;
      end else if (busy) begin
        for (int o = 0; o < NOUT; o++) begin
          logic signed [31:0] base;
          base = (idx == 0) ? (32'(brom[o]) <<< WSH) : acc[o];
          acc[o] <= base + 32'(hold[k]) * 32'(wrom[o][idx]);
          if (32'(idx) == NIN - 1)
            out_data[o] <= relu(sat16(48'((base + 32'(hold[k]) * 32'(wrom[o][idx]) + 32'sd32) >>> WSH)));
        end
        if (32'(idx) == NIN - 1) begin
          idx <= '0;
          out_valid <= 1'b1;
        end else idx <= idx + 1'b1;
        if (32'(k) == C - 1) busy <= 1'b0;
        else                 k <= k + 1'b1;
      end
    end
  end

endmodule
