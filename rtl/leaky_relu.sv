// leaky_relu: hidden-layer activation f_h(z) = max(beta*z, z).
//
// Combinational. beta is the constant BETA_Q / 2^16 (655 ~ 0.01, the
// value of the reference network); beta*z is formed with one multiply and
// an arithmetic right shift (rounding toward minus infinity), and an
// elementwise maximum picks the larger of beta*z and z, as in the
// multiply / "Elementwise MAX" structure of the hidden layer.
// Ports: z (data word in), y (data word out). No clock, no latency.
module leaky_relu
  import nn_pkg::*;
#(
  parameter int unsigned BETA_Q = 655
) (
  input  data_t z,
  output data_t y
);
  logic signed [DATA_W+17:0] prod;
  data_t                     bz;

  always_comb begin
    prod = $signed(z) * $signed({1'b0, 17'(BETA_Q)});
    bz   = data_t'(prod >>> 16);
    y    = (bz > z) ? bz : z;
  end
endmodule
