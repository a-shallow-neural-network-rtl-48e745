// tb_tsvm_ctrl: the controller (NT = 5) against behavioural stand-ins
// that answer each start after a random delay. The testbench checks the
// order of the whole cascade: three unfold/network/kernel phases with
// the right selects (X1->NN1, X2->NN1, X3->NN2), NT kernel runs per
// phase with training base i*672 + {0, 320, 640} and matching kernel-
// memory writes, then NT classifier accumulations reading beta_0..NT-1,
// the bias read at address NT, one finish and one done. Two runs.
module tb_tsvm_ctrl;
  import nn_pkg::*;
  localparam int NT = 5, PER = 672;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, s0, s1, unf_start, nn1_start, nn2_start, ker_start, km_we;
  logic cls_clear, cls_acc, cls_fin;
  logic unf_last = 0, nn1_done = 0, nn2_done = 0, ker_done = 0;
  logic [7:0] ker_n;
  logic [3:0] ker_t;
  logic [$clog2(NT*PER)-1:0] ker_vy_base;
  logic [1:0] km_wz;
  logic [2:0] km_idx, coef_raddr;
  int checks = 0, failures = 0;

  tsvm_ctrl #(.NT(NT)) dut (
    .clk, .rst_n, .start, .busy, .done, .s0, .s1, .unf_start, .unf_last,
    .nn1_start, .nn1_done, .nn2_start, .nn2_done,
    .ker_start, .ker_n, .ker_t, .ker_vy_base, .ker_done,
    .km_we, .km_wz, .km_idx, .coef_raddr, .cls_clear, .cls_acc, .cls_fin);

  always #5 clk = ~clk;

  // stand-ins: answer a start after 1..8 cycles
  task automatic respond(ref logic sig);
    repeat ($urandom_range(1, 8)) @(negedge clk);
    sig = 1;
    @(negedge clk);
    sig = 0;
  endtask
  always @(posedge clk) if (unf_start) fork respond(unf_last); join_none
  always @(posedge clk) if (nn1_start) fork respond(nn1_done); join_none
  always @(posedge clk) if (nn2_start) fork respond(nn2_done); join_none
  always @(posedge clk) if (ker_start) fork respond(ker_done); join_none

  // expected event log
  int phase, n_ker, n_km, n_acc, n_fin, n_done, n_unf, n_nn1, n_nn2, last_raddr;
  always @(posedge clk) if (rst_n) begin
    if (unf_start) begin
      checks++;
      if ({s1, s0} != ((phase == 0) ? 2'b00 : (phase == 1) ? 2'b10 : 2'b01)) failures++;
      n_unf++;
    end
    if (nn1_start) begin checks++; n_nn1++; if (phase == 2) failures++; end
    if (nn2_start) begin checks++; n_nn2++; if (phase != 2) failures++; end
    if (ker_start) begin
      checks += 3;
      if (int'(ker_vy_base) != n_ker * PER + ((phase == 0) ? 0 : (phase == 1) ? 320 : 640)) failures++;
      if (int'(ker_n) != ((phase == 2) ? 16 : 80)) failures++;
      if (int'(ker_t) != ((phase == 2) ? 2 : 4)) failures++;
      n_ker++;
    end
    if (km_we) begin
      checks += 2;
      if (int'(km_wz) != phase) failures++;
      if (int'(km_idx) != n_km) failures++;
      n_km++;
      if (n_km == NT) begin phase++; n_km = 0; n_ker = 0; end
    end
    if (cls_acc) begin
      checks++;
      if (last_raddr != n_acc) failures++;
      n_acc++;
    end
    if (cls_fin) begin checks++; n_fin++; if (last_raddr != NT) failures++; end
    if (done) n_done++;
    last_raddr = int'(coef_raddr);
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      phase = 0; n_ker = 0; n_km = 0; n_acc = 0; n_fin = 0; n_done = 0; n_unf = 0; n_nn1 = 0; n_nn2 = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      checks++;
      if (!busy) failures++;
      wait (done);
      @(negedge clk);
      @(negedge clk);
      checks += 7;
      if (n_unf != 3) failures++;
      if (n_nn1 != 2) failures++;
      if (n_nn2 != 1) failures++;
      if (phase != 3) failures++;
      if (n_acc != NT) failures++;
      if (n_fin != 1) failures++;
      if (n_done != 1 || busy) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
