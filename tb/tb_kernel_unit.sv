// tb_kernel_unit: kernel factors for both unfolding shapes (n=80, t=4 and
// n=16, t=2). Vx sits in a behavioural test-vector memory, Vy in a
// behavioural training memory at a random base. Cases: identical
// orthonormal bases (k must be exactly 1.0), random near-unit vectors,
// and a rotated copy. The result is compared with
// exp(-(t - trace(Z^T Z))) computed in real arithmetic (tb_ref_pkg),
// within 1.5% of full scale (the hardware truncates each Z entry to 12
// fraction bits), and the start-to-done latency with t*t*n + 25 cycles.
module tb_kernel_unit;
  import nn_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [7:0] n_len;
  logic [3:0] t_len;
  logic [17:0] vy_base, vy_addr;
  logic [8:0] vx_addr;
  data_t vx_data, vy_data;
  kval_t k;
  int checks = 0, failures = 0, n_lowk = 0;
  data_t vxm [512];
  data_t vym [4096];

  kernel_unit dut (.clk, .rst_n, .start, .n_len, .t_len, .vy_base, .vx_addr, .vx_data,
                   .vy_addr, .vy_data, .busy, .done, .k);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    vx_data <= vxm[vx_addr];
    vy_data <= vym[vy_addr[11:0]];
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int vx[], vy[];
    int n, t, base, cyc, kk, span;
    real kr;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 24; c++) begin
      n = (c % 2) ? 16 : 80;
      t = (c % 2) ? 2 : 4;
      base = $urandom_range(0, 4096 - n*t);
      vx = new[n*t]; vy = new[n*t];
      span = int'(4096.0 * 1.7 / $sqrt(real'(n)));
      for (int e = 0; e < n*t; e++) begin
        if (c < 4) vx[e] = ((e / t) == (e % t)) ? 4096 : 0;    // orthonormal columns
        else vx[e] = $signed($urandom_range(0, 2*span)) - span;
        if (c < 4) vy[e] = vx[e];
        else if (c < 10) vy[e] = vx[e] + $signed($urandom_range(0, 200)) - 100;
        else vy[e] = $signed($urandom_range(0, 2*span)) - span;
        vxm[e] = data_t'(vx[e]);
        vym[base + e] = data_t'(vy[e]);
      end
      @(negedge clk); n_len = 8'(n); t_len = 4'(t); vy_base = 18'(base); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 5000) begin @(negedge clk); cyc++; end
      kr = kernel_real(vx, vy, n, t, 1.0);
      kk = int'($floor(kr * 65536.0 + 0.5));
      if (kk < 60000) n_lowk++;
      checks += 2;
      if (cyc != t*t*n + 25) begin failures++; $display("latency %0d expected %0d", cyc, t*t*n + 25); end
      if (c < 4) begin
        if (int'(k) != 65536) begin failures++; $display("identity case k=%0d", k); end
      end else if (int'(k) - kk > 1000 || kk - int'(k) > 1000) begin
        failures++; $display("case %0d k=%0d ref=%0d", c, k, kk);
      end
    end
    if (n_lowk == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
