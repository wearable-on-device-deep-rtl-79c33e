// tanh_pwq: coefficient table of the piecewise-quadratic Tanh fit.
//
// For x >= 0, tanh(x) is approximated by y = c2 x^2 + c1 x + c0 on the
// intervals [0,1], (1,2], (2,3], (3,4] and by 1 above 4 (sat = 1).  The
// negative half uses the same table on |x| and negates the result, which
// the caller does.  The block only selects the interval from |x| and
// returns its coefficients; the multiplications are done on the
// classifier's shared multipliers.
//
// Interface: x_abs is |x| in Q9.7; c2, c1, c0 are Q3.14; combinational.
//
// From the document: intervals and coefficients.  The constant terms
// are -0.0038, 0.2324, 0.7370 and 0.9363.
module tanh_pwq
  import gr_pkg::*;
(
  input  data_t x_abs,
  output coef_t c2,
  output coef_t c1,
  output coef_t c0,
  output logic  sat
);

  localparam real Q = 16384.0;
  localparam data_t ONE   = data_t'(1 << FRAC);

  always_comb begin
    sat = 1'b0;
    if (x_abs <= ONE) begin
      c2 = coef_t'(int'(-0.3275 * Q)); c1 = coef_t'(int'(1.0977 * Q)); c0 = coef_t'(int'(-0.0038 * Q));
    end else if (x_abs <= 2 * ONE) begin
      c2 = coef_t'(int'(-0.1690 * Q)); c1 = coef_t'(int'(0.7021 * Q)); c0 = coef_t'(int'(0.2324 * Q));
    end else if (x_abs <= 3 * ONE) begin
      c2 = coef_t'(int'(-0.0282 * Q)); c1 = coef_t'(int'(0.1703 * Q)); c0 = coef_t'(int'(0.7370 * Q));
    end else if (x_abs <= 4 * ONE) begin
      c2 = coef_t'(int'(-0.0039 * Q)); c1 = coef_t'(int'(0.0313 * Q)); c0 = coef_t'(int'(0.9363 * Q));
    end else begin
      c2 = '0; c1 = '0; c0 = coef_t'(int'(Q));
      sat = 1'b1;
    end
  end

endmodule
