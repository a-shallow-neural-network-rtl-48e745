// tb_svm_memory: fills the training-vector array of a full-size SVM
// memory (200 tensors x 672 words) and the coefficient array (200 beta_i
// and b), then reads back random and boundary addresses of both and
// checks data and one-cycle latency.
module tb_svm_memory;
  import nn_pkg::*;
  localparam int NT = 200, DEPTH = NT * 672;
  logic clk = 0, we = 0, cwe = 0;
  logic [17:0] waddr, raddr = '0;
  logic [7:0]  caddr, craddr = '0;
  data_t wdata, rdata, cdata, crdata;
  int checks = 0, failures = 0;

  svm_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata, .cwe, .caddr, .cdata, .craddr, .crdata);

  always #5 clk = ~clk;

  function automatic data_t pat(int a);
    return data_t'((a * 31337 + 777) ^ (a >> 5));
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, c;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); we = 1; waddr = 18'(k); wdata = pat(k);
    end
    for (int k = 0; k <= NT; k++) begin
      @(negedge clk); we = 0; cwe = 1; caddr = 8'(k); cdata = pat(k + 99);
    end
    @(negedge clk); cwe = 0;
    for (int n = 0; n < 2000; n++) begin
      a = (n == 0) ? DEPTH - 1 : $urandom_range(0, DEPTH - 1);
      c = (n == 0) ? NT : $urandom_range(0, NT);
      raddr = 18'(a); craddr = 8'(c);
      @(posedge clk); #1;
      checks += 2;
      if (rdata != pat(a)) failures++;
      if (crdata != pat(c + 99)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
