// sigmoid_nla: non-linear (piecewise polynomial) approximation of the logistic
// function y = 1 / (1 + exp(-x)), the activation function of every neuron.
//
// The input range is cut into intervals and on each one the curve is replaced
// by a short polynomial. The three polynomials and their intervals are those of
// the source design:
//   [-2, -1] : y =  0.0467 x^2 + 0.1239 x + 0.2969
//   (-1,  1) : y =  0.2383 x   + 0.5
//   [ 1,  2) : y = -0.0467 x^2 + 0.2896 x + 0.4882
// As in the source's block diagram, a table of polynomial results feeds a
// four-input multiplexer whose 2-bit select S[1:0] comes from a small
// comparator circuit on the input. The fourth multiplexer input, for inputs
// outside [-2, 2), is this design's choice: the output holds the value the
// adjacent polynomial reaches at the interval edge (about 0.236 below -2 and
// 0.881 at or above +2), so the function has no jump there.
//
// Coefficients are rounded to Q4.12; products truncate (see ann_pkg).
// Interface: x in, y out, sel out (0: [-2,-1], 1: (-1,1), 2: [1,2),
// 3: outside). Purely combinational, no clock.
module sigmoid_nla
  import ann_pkg::*;
(
  input  fix_t       x,
  output fix_t       y,
  output logic [1:0] sel
);

  // Polynomial coefficients, rounded to the nearest Q4.12 step.
  localparam real  SCALE = real'(1 << FRAC_W);
  localparam fix_t A2 = fix_t'(int'( 0.0467 * SCALE));
  localparam fix_t A1 = fix_t'(int'( 0.1239 * SCALE));
  localparam fix_t A0 = fix_t'(int'( 0.2969 * SCALE));
  localparam fix_t B1 = fix_t'(int'( 0.2383 * SCALE));
  localparam fix_t B0 = fix_t'(int'( 0.5    * SCALE));
  localparam fix_t C2 = fix_t'(int'(-0.0467 * SCALE));
  localparam fix_t C1 = fix_t'(int'( 0.2896 * SCALE));
  localparam fix_t C0 = fix_t'(int'( 0.4882 * SCALE));

  localparam fix_t ONE     = FIX_ONE;
  localparam fix_t TWO     = fix_t'(2 << FRAC_W);
  localparam fix_t NEG_ONE = -ONE;
  localparam fix_t NEG_TWO = -TWO;

  function automatic fix_t poly2(input fix_t c2, input fix_t c1, input fix_t c0,
                                 input fix_t v);
    fix_t v2;
    v2 = fix_mul(v, v);
    return fix_add(fix_add(fix_mul(c2, v2), fix_mul(c1, v)), c0);
  endfunction

  // Values held outside [-2, 2): the edge values of the outer polynomials.
  localparam fix_t SAT_LO = poly2(A2, A1, A0, NEG_TWO);
  localparam fix_t SAT_HI = poly2(C2, C1, C0, TWO);

  // Polynomial table: one entry per multiplexer input.
  fix_t lut [4];

  always_comb begin
    lut[0] = poly2(A2, A1, A0, x);
    lut[1] = fix_add(fix_mul(B1, x), B0);
    lut[2] = poly2(C2, C1, C0, x);
    lut[3] = (x < 0) ? SAT_LO : SAT_HI;
  end

  // Interval selection.
  always_comb begin
    if (x < NEG_TWO || x >= TWO) sel = 2'd3;
    else if (x <= NEG_ONE)       sel = 2'd0;
    else if (x < ONE)            sel = 2'd1;
    else                         sel = 2'd2;
  end

  assign y = lut[sel];

endmodule
