// gr_pkg: types, number formats and constant tables shared by the gesture
// recognition accelerator.
//
// Number formats (all two's complement):
//   samples and activations  data_t   16 bit, Q9.7 (1 LSB = 1/128, range +-256)
//   CNN weights              cw_t      8 bit, Q1.6
//   wavelet coefficients     int       Q2.14
//   CM weights and biases    data_t   16 bit, Q7.8
//   Tanh fit coefficients    coef_t   18 bit, Q3.14
// The formats are this design's choice; the document gives none.
//
// The DB4 filter bank coefficients follow from s = 0.483, a0 = 1.732 and
// a1 = -0.268.  The CNN weights are not published, so the ROMs of the
// feature extractor are filled by cnn_w()/cnn_b(), a fixed integer hash
// that gives small weights in [-0.125, 0.11]; a trained network replaces
// these two functions.
package gr_pkg;

  localparam int DATA_W = 16;
  localparam int FRAC   = 7;
  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [7:0]        cw_t;
  typedef logic signed [17:0]       coef_t;

  localparam data_t DATA_MAX = 16'sh7fff;
  localparam data_t DATA_MIN = -16'sh8000;

  // Gesture record layout.
  localparam int NCH     = 12;   // 6 IMUs x 2 angles
  localparam int SEG_LEN = 50;   // frames in the CNN input window

  // ---------------------------------------------------------------- DB4
  localparam real WT_S  = 0.483;
  localparam real WT_A0 = 1.732;
  localparam real WT_A1 = -0.268;
  localparam int  WT_Q  = 14;
  localparam real WT_ONE = 16384.0;
  // analysis low pass  G(z) = s(1 + a0 z^-1 - a0 a1 z^-2 + a1 z^-3)
  localparam int WT_G0 = int'(WT_S * WT_ONE);
  localparam int WT_G1 = int'(WT_S * WT_A0 * WT_ONE);
  localparam int WT_G2 = int'(-WT_S * WT_A0 * WT_A1 * WT_ONE);
  localparam int WT_G3 = int'(WT_S * WT_A1 * WT_ONE);
  // analysis high pass H(z) = s(-a1 - a0 a1 z^-1 - a0 z^-2 + z^-3)
  localparam int WT_H0 = -WT_G3;
  localparam int WT_H1 = WT_G2;
  localparam int WT_H2 = -WT_G1;
  localparam int WT_H3 = WT_G0;
  // synthesis Ghat(z) = H(-z), Hhat(z) = -G(-z).  This bank returns
  // -x[n-3]; the synthesis taps below carry that sign already (negated).
  localparam int WT_NGS0 = -WT_H0;
  localparam int WT_NGS1 =  WT_H1;
  localparam int WT_NGS2 = -WT_H2;
  localparam int WT_NGS3 =  WT_H3;
  localparam int WT_NHS0 =  WT_G0;
  localparam int WT_NHS1 = -WT_G1;
  localparam int WT_NHS2 =  WT_G2;
  localparam int WT_NHS3 = -WT_G3;

  // ------------------------------------------------------------ helpers
  function automatic data_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return DATA_MAX;
    else if (v < -48'sd32768) return DATA_MIN;
    else                      return data_t'(v);
  endfunction

  function automatic data_t relu(input data_t v);
    return v[DATA_W-1] ? data_t'(0) : v;
  endfunction

  // Binary <-> Gray code for weight ROM addresses.
  function automatic logic [7:0] bin2gray(input logic [7:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [7:0] gray2bin(input logic [7:0] g);
    logic [7:0] b;
    b[7] = g[7];
    for (int i = 6; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ------------------------------------------------- CNN weight tables
  function automatic int hash32(input int a);
    int unsigned h;
    h = a;
    h = h ^ (h >> 16);
    h = h * 32'h045d9f3b;
    h = h ^ (h >> 16);
    h = h * 32'h045d9f3b;
    h = h ^ (h >> 16);
    return int'(h);
  endfunction

  // weight of layer, output channel co, input channel ci, tap (0..8 for
  // convolutions, input index for the fully connected layer): Q1.6
  function automatic cw_t cnn_w(input int layer, input int co, input int ci, input int tap);
    int h;
    h = hash32(layer * 1000003 + co * 10007 + ci * 101 + tap);
    return cw_t'((h & 15) - 8);
  endfunction

  // bias of layer, output channel co: Q9.7, in [-2, 2)
  function automatic data_t cnn_b(input int layer, input int co);
    int h;
    h = hash32(layer * 7919 + co * 31 + 17);
    return data_t'((h & 511) - 256);
  endfunction

endpackage
