// hard_tanh: output-layer activation f_O, the hard hyperbolic tangent.
//
// Combinational: two comparators ("element > 1", "element < -1") steer a
// three-input multiplexer that passes -1, 1 or z itself, so every element
// of the singular-vector output lies in [-1, 1].
// Ports: z (data word in), y (data word out). No clock, no latency.
module hard_tanh
  import nn_pkg::*;
(
  input  data_t z,
  output data_t y
);
  logic gt_one, lt_neg_one;

  always_comb begin
    gt_one     = z > ONE;
    lt_neg_one = z < NEG_ONE;
    unique case ({gt_one, lt_neg_one})
      2'b10:   y = ONE;
      2'b01:   y = NEG_ONE;
      default: y = z;
    endcase
  end
endmodule
