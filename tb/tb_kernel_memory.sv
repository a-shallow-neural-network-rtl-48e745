// tb_kernel_memory: writes random kernel factors into the three banks of
// a 200-entry kernel memory, reads every index back and checks k1, k2, k3
// (one-cycle read) and the product K = k1*k2*k3 against the real-valued
// product, within 2 LSB of 2^-16.
module tb_kernel_memory;
  import nn_pkg::*;
  localparam int NT = 200;
  logic clk = 0, we = 0;
  logic [1:0] wz;
  logic [7:0] widx, ridx = '0;
  kval_t wdata, k1, k2, k3, kprod;
  int checks = 0, failures = 0;
  int ref_k [3][NT];

  kernel_memory dut (.clk, .we, .wz, .widx, .wdata, .ridx, .k1, .k2, .k3, .kprod);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real pr;
    int e;
    for (int z = 0; z < 3; z++)
      for (int i = 0; i < NT; i++) begin
        ref_k[z][i] = (i == 0) ? 65536 : $urandom_range(0, 65536);
        @(negedge clk); we = 1; wz = 2'(z); widx = 8'(i); wdata = kval_t'(ref_k[z][i]);
      end
    @(negedge clk); we = 0;
    for (int i = 0; i < NT; i++) begin
      ridx = 8'(i);
      @(posedge clk); #1;
      pr = real'(ref_k[0][i]) * real'(ref_k[1][i]) * real'(ref_k[2][i]) / (65536.0 * 65536.0);
      e = int'(kprod) - int'($floor(pr + 0.5));
      checks += 4;
      if (int'(k1) != ref_k[0][i]) failures++;
      if (int'(k2) != ref_k[1][i]) failures++;
      if (int'(k3) != ref_k[2][i]) failures++;
      if (e > 2 || e < -2) begin failures++; $display("i=%0d prod %0d vs %f", i, kprod, pr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
