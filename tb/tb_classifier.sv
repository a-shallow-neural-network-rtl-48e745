// tb_classifier: 40 random decisions, each of 1..30 terms beta_i*K_i plus
// a bias b. The score is compared with a 64-bit integer sum (beta * K
// with 28 fraction bits, b << 16) and the label with its sign; both
// classes must occur.
module tb_classifier;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0, fin = 0;
  data_t beta, bias;
  kval_t kval;
  acc_t score;
  logic label;
  int checks = 0, failures = 0, n_pos = 0, n_negc = 0;

  classifier dut (.clk, .rst_n, .clear, .acc_en, .beta, .kval, .fin, .bias, .score, .label);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint model;
    int nterms;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < 40; d++) begin
      @(negedge clk); clear = 1;
      model = 0;
      nterms = $urandom_range(1, 30);
      for (int i = 0; i < nterms; i++) begin
        @(negedge clk); clear = 0; acc_en = 1;
        beta = data_t'($urandom); kval = kval_t'($urandom_range(0, 65536));
        model += longint'(beta) * longint'(kval);
      end
      @(negedge clk); clear = 0; acc_en = 0; fin = 1; bias = data_t'($urandom);
      model += longint'(bias) * 65536;
      @(negedge clk); fin = 0;
      checks += 2;
      if (longint'(score) != model) begin failures++; $display("score %0d vs %0d", score, model); end
      if (label != (model >= 0)) failures++;
      if (model >= 0) n_pos++; else n_negc++;
    end
    if (n_pos == 0 || n_negc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
