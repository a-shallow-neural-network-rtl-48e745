// nn_pkg: number formats and helpers shared by the tensorial-SVM datapath.
//
// All data words (tensor samples, weights, biases, singular-vector
// elements, SVM coefficients) are signed fixed point with DATA_W bits of
// which FRAC are fraction bits (Q3.12 by default, range [-8, 8)).
// Products of two words carry 2*FRAC fraction bits and are summed in an
// ACC_W-bit accumulator. Kernel values (outputs of the exponential) are
// unsigned with KFRAC fraction bits and one integer bit, so 1.0 is exact.
// The fixed-point format is a choice of this implementation; the trained
// network of the reference design is evaluated in floating point.
package nn_pkg;

  localparam int DATA_W = 16;
  localparam int FRAC   = 12;
  localparam int ACC_W  = 48;
  localparam int KFRAC  = 16;
  localparam int KW     = KFRAC + 1;

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic        [KW-1:0]     kval_t;

  // Activation function of a fully connected layer.
  typedef enum logic {ACT_LEAKY, ACT_HTANH} act_e;

  localparam data_t ONE     = data_t'(1 << FRAC);
  localparam data_t NEG_ONE = -data_t'(1 << FRAC);

  // Saturate an accumulator-width value to a data word.
  function automatic data_t sat_data(input acc_t v);
    acc_t hi, lo;
    hi = acc_t'(2**(DATA_W-1) - 1);
    lo = -acc_t'(2**(DATA_W-1));
    if (v > hi)      return data_t'(hi);
    else if (v < lo) return data_t'(lo);
    else             return data_t'(v);
  endfunction

  // Magnitude test used by the pruning rule |w| <= thr.
  function automatic logic is_pruned(input data_t w, input logic [DATA_W:0] thr);
    logic [DATA_W:0] mag;
    mag = (w < 0) ? (DATA_W+1)'(-$signed({w[DATA_W-1], w})) : (DATA_W+1)'({1'b0, w});
    return mag <= thr;
  endfunction

endpackage
