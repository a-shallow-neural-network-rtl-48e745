// prune_mac: multiply-accumulate with weight pruning.
//
// One operation per cycle. load_bias starts a neuron: the accumulator is
// loaded with coef (the bias) aligned to 2*FRAC fraction bits. mac adds
// coef*x (weight times input). In either case, when |coef| <= PRUNE_THR
// (raw LSBs) the operation is skipped: the bias is taken as zero, or the
// multiply is not enabled and the accumulator keeps its value; skip pulses
// for that cycle. The pruning rule (skip where |W|,|b| <= 1e-4) follows
// the reference design; with 12 fraction bits 1e-4 is below one LSB, so
// the default threshold 0 skips exactly the zero words.
// Timing: acc is registered, valid the cycle after load_bias / mac.
module prune_mac
  import nn_pkg::*;
#(
  parameter int unsigned PRUNE_THR = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  load_bias,
  input  logic  mac,
  input  data_t coef,
  input  data_t x,
  output acc_t  acc,
  output logic  skip
);
  logic pruned;
  acc_t prod;

  always_comb begin
    pruned = is_pruned(coef, (DATA_W+1)'(PRUNE_THR));
    skip   = (load_bias || mac) && pruned;
    prod   = acc_t'($signed(coef) * $signed(x));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
    end else if (load_bias) begin
      acc <= pruned ? '0 : (acc_t'(coef) <<< FRAC);
    end else if (mac && !pruned) begin
      acc <= acc + prod;
    end
  end
endmodule
