// classifier: SVM decision function y = sum_i beta_i K(x_i, x) + b, eq. (4).
//
// clear zeroes the score. Each acc_en cycle adds beta*kval, where beta is
// a signed data word (FRAC fraction bits) and kval an unsigned kernel
// value (KFRAC fraction bits), so the score carries FRAC+KFRAC (28)
// fraction bits. fin adds the bias b (a data word). label is 1 when the
// score is >= 0 (binary problem; a zero score counts as the positive
// class, a choice of this implementation). All updates take effect at the
// next clock edge; label follows score combinationally.
module classifier
  import nn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  acc_en,
  input  data_t beta,
  input  kval_t kval,
  input  logic  fin,
  input  data_t bias,
  output acc_t  score,
  output logic  label
);
  acc_t term;

  always_comb begin
    term  = acc_t'($signed(beta) * $signed({1'b0, kval}));
    label = !score[ACC_W-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) score <= '0;
    else if (acc_en)     score <= score + term;
    else if (fin)        score <= score + (acc_t'(bias) <<< KFRAC);
  end
endmodule
