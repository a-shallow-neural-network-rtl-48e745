// tb_fc_layer: two small layers (7 inputs, 5 outputs), one with LeakyReLU
// and one with hard tanh, fed from behavioural synchronous memories with
// random weights (some zero, to be pruned). Each output word is compared
// with an integer model of bias + sum(w*x), rescale, saturate and
// activation, computed here; the start-to-done cycle count is checked
// against OUT*(IN+3)+1, and the pruning pulses against the number of zero
// coefficients. Four random rounds.
module tb_fc_layer;
  import nn_pkg::*;
  localparam int IN = 7, OUT = 5, AW = 6;
  localparam int BB = IN * OUT;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  int n_neg = 0, n_sat = 0;

  data_t wmem [BB + OUT];
  data_t xmem [IN];
  data_t ya [OUT], yb [OUT];

  logic          busy_a, done_a, skip_a, ywe_a, busy_b, done_b, skip_b, ywe_b;
  logic [AW-1:0] wa_a, wa_b;
  logic [2:0]    xa_a, xa_b, ya_a, ya_b;
  data_t         wd_a, wd_b, xd_a, xd_b, yd_a, yd_b;

  fc_layer #(.IN_LEN(IN), .OUT_LEN(OUT), .ACT(ACT_LEAKY), .AW(AW), .W_BASE(0), .B_BASE(BB)) dut_a (
    .clk, .rst_n, .start, .busy(busy_a), .done(done_a),
    .w_addr(wa_a), .w_data(wd_a), .x_addr(xa_a), .x_data(xd_a),
    .y_we(ywe_a), .y_addr(ya_a), .y_data(yd_a), .skip(skip_a));
  fc_layer #(.IN_LEN(IN), .OUT_LEN(OUT), .ACT(ACT_HTANH), .AW(AW), .W_BASE(0), .B_BASE(BB)) dut_b (
    .clk, .rst_n, .start, .busy(busy_b), .done(done_b),
    .w_addr(wa_b), .w_data(wd_b), .x_addr(xa_b), .x_data(xd_b),
    .y_we(ywe_b), .y_addr(ya_b), .y_data(yd_b), .skip(skip_b));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    wd_a <= wmem[wa_a];
    wd_b <= wmem[wa_b];
    xd_a <= xmem[xa_a];
    xd_b <= xmem[xa_b];
    if (ywe_a) ya[ya_a] <= yd_a;
    if (ywe_b) yb[ya_b] <= yd_b;
  end

  int skips_a;
  always @(posedge clk) if (skip_a) skips_a++;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    int cyc, nzero;
    longint a;
    int z, e_leaky, e_htanh;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      nzero = 0;
      for (int k = 0; k < BB + OUT; k++) begin
        wmem[k] = ($urandom_range(0, 4) == 0) ? data_t'(0) : data_t'($signed($urandom_range(0, 8191)) - 4096);
        if (wmem[k] == 0) nzero++;
      end
      for (int k = 0; k < IN; k++) xmem[k] = data_t'($signed($urandom_range(0, 16383)) - 8192);
      skips_a = 0;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done_a) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != OUT * (IN + 3) + 1) begin
        failures++;
        $display("latency %0d expected %0d", cyc, OUT * (IN + 3) + 1);
      end
      @(negedge clk);
      checks++;
      if (skips_a != nzero) begin failures++; $display("skips %0d expected %0d", skips_a, nzero); end
      for (int j = 0; j < OUT; j++) begin
        a = longint'(wmem[BB + j]) * 4096;
        for (int i = 0; i < IN; i++) a += longint'(wmem[j*IN + i]) * longint'(xmem[i]);
        z = sat16(a >>> 12);
        e_leaky = (z >= 0) ? z : int'($floor(real'(z) * 655.0 / 65536.0));
        e_htanh = (z > 4096) ? 4096 : (z < -4096) ? -4096 : z;
        if (z < 0) n_neg++;
        if (z > 4096 || z < -4096) n_sat++;
        checks += 2;
        if (int'(ya[j]) != e_leaky) begin failures++; $display("leaky j=%0d got %0d exp %0d", j, ya[j], e_leaky); end
        if (int'(yb[j]) != e_htanh) begin failures++; $display("htanh j=%0d got %0d exp %0d", j, yb[j], e_htanh); end
      end
    end
    if (n_neg == 0 || n_sat == 0) begin failures++; $display("coverage neg=%0d sat=%0d", n_neg, n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
