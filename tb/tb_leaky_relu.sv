// tb_leaky_relu: exhaustive check of the LeakyReLU activation.
// Every 16-bit input z is applied; the expected value is z for z >= 0 and
// floor(z * 655 / 65536) (beta ~ 0.01) for z < 0, computed in real
// arithmetic independently of the block.
module tb_leaky_relu;
  import nn_pkg::*;
  data_t z, y;
  int checks = 0, failures = 0;

  leaky_relu dut (.z, .y);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int v = -32768; v < 32768; v++) begin
      z = data_t'(v);
      #1;
      if (v >= 0) exp_v = v;
      else        exp_v = int'($floor(real'(v) * 655.0 / 65536.0));
      checks++;
      if (int'(y) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch z=%0d y=%0d exp=%0d", v, y, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
