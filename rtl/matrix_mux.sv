// matrix_mux: the MUX / DeMUX pair between the unfolding and the two
// networks.
//
// The MUX (selects S0, S1) picks one of the three unfolded matrices
// X1 (4x80), X2 (4x80), X3 (20x16); the DeMUX (select S0) sends the chosen
// element stream to the network that fits its shape. Encoding (this
// design's choice, chosen so that S0 alone steers the DeMUX):
//   S0=0, S1=0 : X1 -> NN1      S0=0, S1=1 : X2 -> NN1
//   S0=1       : X3 -> NN2
// Combinational. The element index of the stream goes to both networks
// directly and does not pass through here.
module matrix_mux
  import nn_pkg::*;
(
  input  logic  s0,
  input  logic  s1,
  input  logic  valid_in,
  input  data_t x1,
  input  data_t x2,
  input  data_t x3,
  output logic  nn1_we,
  output logic  nn2_we,
  output data_t data_out
);
  data_t sel;

  always_comb begin
    // MUX
    if (s0)      sel = x3;
    else if (s1) sel = x2;
    else         sel = x1;
    // DeMUX
    nn1_we   = valid_in && !s0;
    nn2_we   = valid_in &&  s0;
    data_out = sel;
  end
endmodule
