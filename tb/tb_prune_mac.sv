// tb_prune_mac: random bias-load and multiply-accumulate sequences,
// about a quarter of the coefficients zero. A 64-bit integer model
// (bias << 12, sum of w*x, zero coefficients skipped) is compared with the
// accumulator after every operation, and the skip flag with the model.
module tb_prune_mac;
  import nn_pkg::*;
  logic  clk = 0, rst_n = 0, load_bias = 0, mac = 0;
  data_t coef = '0, x = '0;
  acc_t  acc;
  logic  skip;
  int checks = 0, failures = 0, n_skips = 0;
  longint model;

  prune_mac dut (.clk, .rst_n, .load_bias, .mac, .coef, .x, .acc, .skip);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_skip;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      load_bias = (n % 25 == 0);
      mac       = !load_bias && ($urandom_range(0, 7) != 0);
      coef      = ($urandom_range(0, 3) == 0) ? data_t'(0) : data_t'($urandom);
      x         = data_t'($urandom);
      #1;
      exp_skip  = (load_bias || mac) && (coef == 0);
      checks++;
      if (skip != exp_skip) failures++;
      if (exp_skip) n_skips++;
      if (load_bias)             model = longint'(coef) * 4096;
      else if (mac && coef != 0) model = model + longint'(coef) * longint'(x);
      @(posedge clk);
      #1;
      checks++;
      if (longint'(acc) != model) begin
        failures++;
        if (failures < 10) $display("acc mismatch %0d vs %0d", acc, model);
      end
    end
    if (n_skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
