// tb_matrix_mux: applies every select combination with random data and
// checks that the selected matrix reaches the right network: X1 to NN1
// for S0=0,S1=0, X2 to NN1 for S0=0,S1=1, X3 to NN2 for S0=1, with the
// write enable of the other network low and the index passed through.
module tb_matrix_mux;
  import nn_pkg::*;
  logic s0, s1, valid_in, nn1_we, nn2_we;
  data_t x1, x2, x3, data_out;
  int checks = 0, failures = 0;

  matrix_mux dut (.s0, .s1, .valid_in, .x1, .x2, .x3, .nn1_we, .nn2_we, .data_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t e;
    for (int n = 0; n < 400; n++) begin
      {s1, s0} = 2'(n % 4);
      valid_in = n[2];
      x1 = data_t'($urandom); x2 = data_t'($urandom); x3 = data_t'($urandom);
      #1;
      e = s0 ? x3 : (s1 ? x2 : x1);
      checks += 3;
      if (data_out != e) failures++;
      if (nn1_we != (valid_in && !s0)) failures++;
      if (nn2_we != (valid_in && s0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
