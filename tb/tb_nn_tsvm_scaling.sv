// tb_nn_tsvm_scaling: the end-to-end classification of tb_nn_tsvm_top
// repeated with NT = 900 training tensors, the largest training set of
// the scalability study (4.5 times the default). Same stimulus scheme and
// checks: bit-exact network outputs, all 3 x 900 kernel factors, decision
// value and label of two runs, and the 400 ms real-time limit at 100 MHz.
// The tensor is loaded directly through the tensor write port (the raw-
// recording path is left idle here; it is covered by tb_nn_tsvm_top).
module tb_nn_tsvm_scaling;
  import nn_pkg::*;
  import tb_ref_pkg::*;
  localparam int NT = 900, PER = 672;
  localparam int SAW = $clog2(NT * PER), CAW = $clog2(NT + 1);
  localparam int H1 = 140, H2 = 40, L = 320, O1 = 320, O2 = 32;
  localparam int D1 = H1*L + H1 + O1*H1 + O1;
  localparam int D2 = H2*L + H2 + O2*H2 + O2;

  logic clk = 0, rst_n = 0, start = 0;
  logic ten_we = 0, nn_we = 0, svm_we = 0, coef_we = 0;
  logic [8:0]  ten_addr = '0;
  logic [16:0] nn_addr = '0;
  logic [SAW-1:0] svm_addr = '0;
  logic [CAW-1:0] coef_addr = '0;
  data_t ten_data = '0, nn_data = '0, svm_data = '0, coef_data = '0;
  logic raw_valid = 0, raw_first = 0, raw_ready, raw_done;
  data_t raw_frame [16];
  logic busy, done, label;
  acc_t score;

  nn_tsvm_top #(.NT(NT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c_skip = 0, c_leaky_neg = 0, c_sat_hi = 0, c_sat_lo = 0;
  int c_x1 = 0, c_x2 = 0, c_x3 = 0, c_pos = 0, c_neg = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_nn1.skip) c_skip++;
    if (dut.u_nn2.skip) c_skip++;
    if (dut.u_nn1.u_hidden.y_we && dut.u_nn1.u_hidden.z < 0) c_leaky_neg++;
    if (dut.u_nn2.u_hidden.y_we && dut.u_nn2.u_hidden.z < 0) c_leaky_neg++;
    if (dut.u_nn1.u_output.y_we && dut.u_nn1.u_output.z > 4096) c_sat_hi++;
    if (dut.u_nn1.u_output.y_we && dut.u_nn1.u_output.z < -4096) c_sat_lo++;
    if (dut.m_nn1_we && !dut.s1) c_x1++;
    if (dut.m_nn1_we && dut.s1) c_x2++;
    if (dut.m_nn2_we) c_x3++;
  end

  initial begin
    #400000000;   // 40 million cycles
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int span, int zero_pct);
    if ($urandom_range(0, 99) < zero_pct) return 0;
    return $signed($urandom_range(0, 2*span)) - span;
  endfunction

  int phi [4][4][20];
  int x1[], x2[], x3[];
  int w1h[], b1h[], w1o[], b1o[], w2h[], b2h[], w2o[], b2o[];
  int yh[], v1[], v2[], v3[];
  int vy [NT][];
  int beta [NT];
  int bias;

  task automatic load_coefs();
    for (int i = 0; i <= NT; i++) begin
      @(negedge clk);
      coef_we = 1; coef_addr = CAW'(i); coef_data = data_t'((i == NT) ? bias : beta[i]);
    end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic run_and_check(input bit exp_label);
    real kref [3][NT];
    real sref, sabs, sdut;
    int cyc, kk, vx_z[], n, t;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    $display("classification latency: %0d cycles (%0.3f ms at 100 MHz)", cyc, real'(cyc) / 1.0e5);
    checks++;
    if (cyc > 40_000_000) begin failures++; $display("not real time"); end
    // network outputs still held: V of X2 in NN1, V of X3 in NN2
    for (int e = 0; e < O1; e++) begin
      checks++;
      if (int'(dut.u_nn1.v_buf[e]) != v2[e]) begin failures++; if (failures < 10) $display("NN1 V[%0d] %0d vs %0d", e, dut.u_nn1.v_buf[e], v2[e]); end
    end
    for (int e = 0; e < O2; e++) begin
      checks++;
      if (int'(dut.u_nn2.v_buf[e]) != v3[e]) begin failures++; if (failures < 10) $display("NN2 V[%0d] %0d vs %0d", e, dut.u_nn2.v_buf[e], v3[e]); end
    end
    // kernel factors and decision value
    sref = real'(bias) / 4096.0; sabs = 0.0;
    for (int i = 0; i < NT; i++) begin
      real kp;
      kp = 1.0;
      for (int z = 0; z < 3; z++) begin
        int part[];
        vx_z = (z == 0) ? v1 : (z == 1) ? v2 : v3;
        n = (z == 2) ? 16 : 80; t = (z == 2) ? 2 : 4;
        part = new[n*t];
        for (int e = 0; e < n*t; e++) part[e] = vy[i][((z == 0) ? 0 : (z == 1) ? 320 : 640) + e];
        kref[z][i] = kernel_real(vx_z, part, n, t, 1.0);
        kp *= kref[z][i];
        kk = (z == 0) ? int'(dut.u_kmem.bank1[i]) : (z == 1) ? int'(dut.u_kmem.bank2[i]) : int'(dut.u_kmem.bank3[i]);
        checks++;
        if (rabs(real'(kk) / 65536.0 - kref[z][i]) > 0.015) begin
          failures++; if (failures < 10) $display("k%0d[%0d] %0d vs %f", z + 1, i, kk, kref[z][i]);
        end
      end
      sref += real'(beta[i]) / 4096.0 * kp;
      sabs += rabs(real'(beta[i]) / 4096.0);
    end
    sdut = real'(score) / real'(64'd1 << 28);
    $display("score %f, model %f, label %0d", sdut, sref, label);
    checks += 2;
    if (rabs(sdut - sref) > 0.03 * sabs + 0.01) begin failures++; $display("score mismatch"); end
    if (label != exp_label) begin failures++; $display("label %0d expected %0d", label, exp_label); end
    if (label) c_pos++; else c_neg++;
  endtask

  initial begin
    int span;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // tensor and its unfoldings
    x1 = new[L]; x2 = new[L]; x3 = new[L];
    foreach (phi[a, b, c]) phi[a][b][c] = rnd(2048, 0);
    for (int e = 0; e < L; e++) begin
      x1[e] = phi[e / 80][(e % 80) % 4][(e % 80) / 4];
      x2[e] = phi[(e % 80) % 4][e / 80][(e % 80) / 4];
      x3[e] = phi[(e % 16) % 4][(e % 16) / 4][e / 16];
    end
    // network weights
    w1h = new[H1*L]; b1h = new[H1]; w1o = new[O1*H1]; b1o = new[O1];
    w2h = new[H2*L]; b2h = new[H2]; w2o = new[O2*H2]; b2o = new[O2];
    foreach (w1h[k]) w1h[k] = rnd(1200, 10);
    foreach (b1h[k]) b1h[k] = rnd(1000, 10);
    foreach (w1o[k]) w1o[k] = rnd(400, 10);
    foreach (b1o[k]) b1o[k] = rnd(300, 10);
    foreach (w2h[k]) w2h[k] = rnd(1200, 10);
    foreach (b2h[k]) b2h[k] = rnd(1000, 10);
    foreach (w2o[k]) w2o[k] = rnd(700, 10);
    foreach (b2o[k]) b2o[k] = rnd(300, 10);
    b1o[0] = 8000;     // drives the hard tanh into +1
    b1o[1] = -8000;    // and into -1
    // reference network outputs
    layer(x1, w1h, b1h, L, H1, 1'b0, yh); layer(yh, w1o, b1o, H1, O1, 1'b1, v1);
    layer(x2, w1h, b1h, L, H1, 1'b0, yh); layer(yh, w1o, b1o, H1, O1, 1'b1, v2);
    layer(x3, w2h, b2h, L, H2, 1'b0, yh); layer(yh, w2o, b2o, H2, O2, 1'b1, v3);
    // training set
    for (int i = 0; i < NT; i++) begin
      vy[i] = new[PER];
      for (int e = 0; e < PER; e++) begin
        int src;
        src = (e < 320) ? v1[e] : (e < 640) ? v2[e - 320] : v3[e - 640];
        span = (e < 640) ? 780 : 1740;
        vy[i][e] = (i % 2 == 0) ? src + rnd(60, 0) : rnd(span, 0);
      end
      beta[i] = (i % 2 == 0) ? 2048 : -1228;
    end
    bias = -410;

    // load everything
    for (int c = 0; c < 20; c++) for (int b = 0; b < 4; b++) for (int a = 0; a < 4; a++) begin
      @(negedge clk); ten_we = 1; ten_addr = 9'(a + 4*b + 16*c); ten_data = data_t'(phi[a][b][c]);
    end
    @(negedge clk); ten_we = 0;
    for (int k = 0; k < D1; k++) begin
      int v;
      if (k < H1*L) v = w1h[k];
      else if (k < H1*L + H1) v = b1h[k - H1*L];
      else if (k < H1*L + H1 + O1*H1) v = w1o[k - H1*L - H1];
      else v = b1o[k - H1*L - H1 - O1*H1];
      @(negedge clk); nn_we = 1; nn_addr = 17'(k); nn_data = data_t'(v);
    end
    for (int k = 0; k < D2; k++) begin
      int v;
      if (k < H2*L) v = w2h[k];
      else if (k < H2*L + H2) v = b2h[k - H2*L];
      else if (k < H2*L + H2 + O2*H2) v = w2o[k - H2*L - H2];
      else v = b2o[k - H2*L - H2 - O2*H2];
      @(negedge clk); nn_we = 1; nn_addr = 17'(D1 + k); nn_data = data_t'(v);
    end
    @(negedge clk); nn_we = 0;
    for (int i = 0; i < NT; i++)
      for (int e = 0; e < PER; e++) begin
        @(negedge clk); svm_we = 1; svm_addr = SAW'(i*PER + e); svm_data = data_t'(vy[i][e]);
      end
    @(negedge clk); svm_we = 0;
    load_coefs();

    run_and_check(1'b1);
    for (int i = 0; i < NT; i += 2) beta[i] = -2048;
    load_coefs();
    run_and_check(1'b0);

    $display("mechanisms: pruned=%0d leaky_neg=%0d sat_hi=%0d sat_lo=%0d X1=%0d X2=%0d X3=%0d pos=%0d neg=%0d",
             c_skip, c_leaky_neg, c_sat_hi, c_sat_lo, c_x1, c_x2, c_x3, c_pos, c_neg);
    checks += 9;
    if (c_skip == 0) failures++;
    if (c_leaky_neg == 0) failures++;
    if (c_sat_hi == 0) failures++;
    if (c_sat_lo == 0) failures++;
    if (c_x1 != 2*L) failures++;
    if (c_x2 != 2*L) failures++;
    if (c_x3 != 2*L) failures++;
    if (c_pos == 0) failures++;
    if (c_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
