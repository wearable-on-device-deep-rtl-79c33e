// cm: classification module, a 4-8-8-1 multilayer perceptron.
//
// Hidden layer 1 has 8 Tanh neurons, hidden layer 2 has 8 ReTanh neurons
// (ReTanh(x) = max(0, tanh(x))), and the output neuron uses ReLU.  Its
// value, rounded to an integer, is the recognised gesture number.
//
// All arithmetic runs on NMUL = 8 shared 18x18 multipliers, one per
// hidden neuron, scheduled in a fixed pipeline:
//   L1   4 clocks  neuron j accumulates x[k] * w1[j][k], one input a clock
//   A1   3 clocks  Tanh on all 8 neurons: |z|^2, c2 * |z|^2, c1 * |z|
//   L2   8 clocks  neuron j accumulates h1[k] * w2[j][k]
//   A2   3 clocks  ReTanh, as A1 plus the clamp at 0
//   O1   1 clock   the 8 products h2[i] * w3[i]
//   O2   1 clock   their sum plus the bias
//   O3   1 clock   ReLU and rounding; done pulses
// so one inference takes 21 clocks from start to done.  Tanh is the
// piecewise-quadratic fit of tanh_pwq on |z|, with the sign restored.
// The hidden values are kept in registers between the layers.
//
// Interface: x[0..3] (Q9.7) is sampled on start.  Weights and biases
// (Q7.8) sit in a 128-word register memory written through w_we/w_addr/
// w_data:  w1[j][i] at 4j+i, b1[j] at 32+j, w2[j][i] at 40+8j+i,
// b2[j] at 104+j, w3[i] at 112+i, b3 at 120.  y is the output neuron
// (Q9.7) and gesture its rounded value; both hold until the next start.
//
// From the document: the 4-8-8-1 shape, the Tanh / ReTanh / ReLU choice,
// the eight multipliers, the three-clock activation and the 21-clock
// total.  This design's choices: the single output neuron, the order of
// work inside the 21 clocks, the memory map and the number formats.
module cm
  import gr_pkg::*;
#(
  parameter int NIN  = 4,
  parameter int NHID = 8,
  parameter int NMUL = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  data_t [NIN-1:0]   x,
  input  logic              w_we,
  input  logic [6:0]        w_addr,
  input  data_t             w_data,
  output logic              busy,
  output logic              done,
  output data_t             y,
  output logic [3:0]        gesture
);

  localparam int A_W1 = 0, A_B1 = 32, A_W2 = 40, A_B2 = 104, A_W3 = 112, A_B3 = 120;

  data_t wmem [128];
  always_ff @(posedge clk) if (w_we) wmem[w_addr] <= w_data;

  typedef enum logic [2:0] {S_IDLE, S_L1, S_A1, S_L2, S_A2, S_O1, S_O2, S_O3} state_t;
  state_t state;
  logic [2:0] k;

  data_t [NIN-1:0] xr;
  logic signed [39:0] acc  [NHID];
  data_t              t    [NHID];   // |z| clipped
  logic               neg  [NHID];
  logic signed [35:0] p    [NHID];
  logic signed [35:0] q    [NHID];
  data_t              h1   [NHID];
  data_t              h2   [NHID];
  logic signed [35:0] prod_r [NMUL];
  logic signed [39:0] sum;

  // ------------------------------------------------ shared multipliers
  logic signed [17:0] mul_a [NMUL];
  logic signed [17:0] mul_b [NMUL];
  logic signed [35:0] mul_p [NMUL];
  always_comb for (int i = 0; i < NMUL; i++) mul_p[i] = mul_a[i] * mul_b[i];

  // activation helpers
  data_t z     [NHID];
  data_t z_abs [NHID];
  coef_t c2 [NHID], c1 [NHID], c0 [NHID];
  logic  sat [NHID];
  for (genvar j = 0; j < NHID; j++) begin : g_act
    tanh_pwq u_fit (.x_abs(t[j]), .c2(c2[j]), .c1(c1[j]), .c0(c0[j]), .sat(sat[j]));
  end
  localparam data_t T_CLIP = data_t'((4 << FRAC) + 1);
  always_comb
    for (int j = 0; j < NHID; j++) begin
      z[j]     = sat16(48'((acc[j] + 40'sd128) >>> 8));
      z_abs[j] = z[j][DATA_W-1] ? -z[j] : z[j];
      if (z_abs[j] > T_CLIP || z[j] == DATA_MIN) z_abs[j] = T_CLIP;
    end

  // fitted tanh(|z|) in Q9.7 after the third activation clock
  data_t act [NHID];
  always_comb
    for (int j = 0; j < NHID; j++) begin
      logic signed [39:0] s;
      data_t m;
      s = 40'(q[j]) + 40'(mul_p[j]) + (40'(c0[j]) <<< FRAC) + 40'sd8192;
      m = sat[j] ? data_t'(1 << FRAC) : sat16(48'(s >>> 14));
      act[j] = neg[j] ? -m : m;
    end

  // operand selection
  always_comb
    for (int i = 0; i < NMUL; i++) begin
      mul_a[i] = '0;
      mul_b[i] = '0;
      unique case (state)
        S_L1: begin mul_a[i] = 18'(xr[k[1:0]]); mul_b[i] = 18'(wmem[A_W1 + 4*i + int'(k)]); end
        S_L2: begin mul_a[i] = 18'(h1[k]);      mul_b[i] = 18'(wmem[A_W2 + 8*i + int'(k)]); end
        S_A1, S_A2: begin
          unique case (k)
            3'd0:    begin mul_a[i] = 18'(z_abs[i]); mul_b[i] = 18'(z_abs[i]); end
            3'd1:    begin mul_a[i] = c2[i];         mul_b[i] = 18'(p[i] >>> FRAC); end
            default: begin mul_a[i] = c1[i];         mul_b[i] = 18'(t[i]); end
          endcase
        end
        S_O1:    begin mul_a[i] = 18'(h2[i]); mul_b[i] = 18'(wmem[A_W3 + i]); end
        default: ;
      endcase
    end

  logic signed [39:0] prod_sum;
  always_comb begin
    prod_sum = 40'(wmem[A_B3]) <<< FRAC;
    for (int i = 0; i < NMUL; i++) prod_sum += 40'(prod_r[i]);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k <= '0; done <= 1'b0;
      y <= '0; gesture <= '0; sum <= '0; xr <= '0;
      for (int j = 0; j < NHID; j++) begin
        acc[j] <= '0; t[j] <= '0; neg[j] <= 1'b0; p[j] <= '0; q[j] <= '0;
        h1[j] <= '0; h2[j] <= '0;
      end
      for (int i = 0; i < NMUL; i++) prod_r[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr <= x; k <= '0; state <= S_L1;
        end
        S_L1, S_L2: begin
          for (int j = 0; j < NHID; j++) begin
            logic signed [39:0] base;
            base = (k == 0) ? (40'(wmem[(state == S_L1 ? A_B1 : A_B2) + j]) <<< FRAC) : acc[j];
            acc[j] <= base + 40'(mul_p[j]);
          end
          if ((state == S_L1 && k == 3'(NIN - 1)) || (state == S_L2 && k == 3'(NHID - 1))) begin
            k <= '0;
            state <= (state == S_L1) ? S_A1 : S_A2;
          end else k <= k + 1'b1;
        end
        S_A1, S_A2: begin
          unique case (k)
            3'd0: for (int j = 0; j < NHID; j++) begin
                    t[j] <= z_abs[j]; neg[j] <= z[j][DATA_W-1]; p[j] <= mul_p[j];
                  end
            3'd1: for (int j = 0; j < NHID; j++) q[j] <= mul_p[j];
            default: for (int j = 0; j < NHID; j++)
                    if (state == S_A1) h1[j] <= act[j];
                    else               h2[j] <= act[j][DATA_W-1] ? data_t'(0) : act[j];
          endcase
          if (k == 3'd2) begin
            k <= '0;
            state <= (state == S_A1) ? S_L2 : S_O1;
          end else k <= k + 1'b1;
        end
        S_O1: begin
          for (int i = 0; i < NMUL; i++) prod_r[i] <= mul_p[i];
          state <= S_O2;
        end
        S_O2: begin
          sum <= prod_sum;
          state <= S_O3;
        end
        S_O3: begin
          data_t yo;
          logic [15:0] g;
          yo = relu(sat16(48'((sum + 40'sd128) >>> 8)));
          g  = 16'((17'(yo) + 17'sd64) >>> FRAC);
          y <= yo;
          gesture <= (g > 16'd15) ? 4'd15 : g[3:0];
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the schedule must use the full multiplier array in the output layer
  initial assert (NMUL == NHID) else $error("cm: NMUL must equal NHID");

endmodule
