// ann_pkg: types, sizes and fixed-point arithmetic shared by the water-quality
// neural network.
//
// The network is a multilayer perceptron that takes four normalised water
// parameters (pH, ORP, dissolved oxygen, total dissolved solids) and sorts a
// sample into one of three classes (potable, agricultural, non-usable). The
// four inputs and three classes follow the source design; the single hidden
// layer of four neurons is this design's choice, made so that every neuron has
// the four-input structure of the basic neuron (four multipliers, a two-level
// adder tree, an activation function).
//
// Number format (this design's choice): every activation, weight and error
// term is a 16-bit two's-complement fixed-point value with 12 fraction bits
// (Q4.12, range -8.0 .. +7.99976). Sixteen bits sit at the top of the 12-16
// bit range that back-propagation is known to need. Products are formed at
// full width, shifted right arithmetically by 12 (truncation toward minus
// infinity) and saturated to 16 bits. Sums saturate as well.
package ann_pkg;

  localparam int unsigned DATA_W = 16;   // width of every fixed-point value
  localparam int unsigned FRAC_W = 12;   // fraction bits
  localparam int unsigned ACC_W  = 32;   // epoch gradient accumulator width (same 12 fraction bits)

  localparam int unsigned N_IN  = 4;     // pH, ORP, DO, TDS
  localparam int unsigned N_HID = 4;     // hidden neurons
  localparam int unsigned N_OUT = 3;     // one output neuron per class

  // Flat weight numbering used by the weight store and the learning unit:
  // hidden weight w1[j][i] (input i -> hidden j) is at j*N_IN + i,
  // output weight w2[k][j] (hidden j -> output k) is at N_HID*N_IN + k*N_HID + j.
  localparam int unsigned N_W1    = N_HID * N_IN;
  localparam int unsigned N_W2    = N_OUT * N_HID;
  localparam int unsigned N_W     = N_W1 + N_W2;
  localparam int unsigned WADDR_W = $clog2(N_W);

  typedef logic signed [DATA_W-1:0] fix_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  localparam fix_t FIX_ONE = fix_t'(1 << FRAC_W);
  localparam fix_t FIX_MAX = fix_t'({1'b0, {(DATA_W-1){1'b1}}});
  localparam fix_t FIX_MIN = fix_t'({1'b1, {(DATA_W-1){1'b0}}});

  // Output class. The encoding is this design's choice.
  typedef enum logic [1:0] {
    CLASS_POTABLE     = 2'd0,
    CLASS_AGRICULTURE = 2'd1,
    CLASS_NON_USABLE  = 2'd2
  } water_class_e;

  // Saturate a wide signed value to the 16-bit fixed-point range.
  function automatic fix_t fix_sat(input logic signed [63:0] v);
    if (v > 64'(FIX_MAX))      return FIX_MAX;
    else if (v < 64'(FIX_MIN)) return FIX_MIN;
    else                       return fix_t'(v);
  endfunction

  // Q4.12 x Q4.12 -> Q4.12, truncating and saturating.
  function automatic fix_t fix_mul(input fix_t a, input fix_t b);
    logic signed [2*DATA_W-1:0] p;
    p = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    return fix_sat(64'(p >>> FRAC_W));
  endfunction

  function automatic fix_t fix_add(input fix_t a, input fix_t b);
    return fix_sat(64'(a) + 64'(b));
  endfunction

  function automatic fix_t fix_sub(input fix_t a, input fix_t b);
    return fix_sat(64'(a) - 64'(b));
  endfunction

endpackage
