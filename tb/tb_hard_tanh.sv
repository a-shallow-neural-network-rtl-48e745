// tb_hard_tanh: exhaustive check of the hard tanh activation.
// Every 16-bit input (12 fraction bits) is applied; expected is -4096
// (-1.0) below -1.0, 4096 (1.0) above 1.0, and the input otherwise.
module tb_hard_tanh;
  import nn_pkg::*;
  data_t z, y;
  int checks = 0, failures = 0;
  int n_hi = 0, n_lo = 0, n_pass = 0;

  hard_tanh dut (.z, .y);

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
      if (v > 4096)       begin exp_v = 4096;  n_hi++;   end
      else if (v < -4096) begin exp_v = -4096; n_lo++;   end
      else                begin exp_v = v;     n_pass++; end
      checks++;
      if (int'(y) != exp_v) begin
        failures++;
        if (failures < 10) $display("mismatch z=%0d y=%0d exp=%0d", v, y, exp_v);
      end
    end
    if (n_hi == 0 || n_lo == 0 || n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
