// tb_nn_scaling: runs the shallow network at the four hidden/output
// sizes of the network scalability study: 40/32 (20x16 input, V 16x2),
// 140/320 (4x80 input, V 80x4), 400/256 (20x16 input, full V 16x16) and
// 400/6400 (4x80 input, full V 80x80). Each case checks every output
// element bit-exactly and the latency formula, and prints the latency at
// 100 MHz.
module tb_nn_scaling;
  logic clk = 0, rst_n = 0;
  logic go [4];
  logic fin [4];
  int   chk [4], fl [4], lat [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  nn_case_runner #(.M(20), .N(16), .H(40),  .T(2))  c0 (.clk, .rst_n, .go(go[0]), .finished(fin[0]), .checks(chk[0]), .failures(fl[0]), .latency(lat[0]));
  nn_case_runner #(.M(4),  .N(80), .H(140), .T(4))  c1 (.clk, .rst_n, .go(go[1]), .finished(fin[1]), .checks(chk[1]), .failures(fl[1]), .latency(lat[1]));
  nn_case_runner #(.M(20), .N(16), .H(400), .T(16)) c2 (.clk, .rst_n, .go(go[2]), .finished(fin[2]), .checks(chk[2]), .failures(fl[2]), .latency(lat[2]));
  nn_case_runner #(.M(4),  .N(80), .H(400), .T(80)) c3 (.clk, .rst_n, .go(go[3]), .finished(fin[3]), .checks(chk[3]), .failures(fl[3]), .latency(lat[3]));

  initial begin
    #200000000;   // 20 million cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (go[k]) go[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      go[k] = 1;
      wait (fin[k]);
      $display("case %0d: latency %0d cycles (%0.3f ms at 100 MHz), checks %0d, failures %0d",
               k, lat[k], real'(lat[k]) / 1.0e5, chk[k], fl[k]);
      checks += chk[k];
      failures += fl[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
