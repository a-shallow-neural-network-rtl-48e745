// tb_exp_unit: compares exp(-x) from the unit with $exp in real
// arithmetic for x = 0, 1.0, a few boundary values and 500 random
// arguments spread over [0, 20). The result must be within 24 LSB (of
// 2^-16) of round(exp(-x) * 65536), and done must come XW+1 = 21 cycles
// after start.
module tb_exp_unit;
  import nn_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [19:0] x;
  kval_t y;
  int checks = 0, failures = 0;

  exp_unit dut (.clk, .rst_n, .start, .x, .busy, .done, .y);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, cyc, ev, err;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 506; n++) begin
      case (n)
        0: xv = 0;
        1: xv = 4096;
        2: xv = 1;
        3: xv = 2048;
        4: xv = 65535;
        5: xv = 20'hFFFFF;
        default: xv = (n % 2) ? $urandom_range(0, 16383) : $urandom_range(0, 81919);
      endcase
      @(negedge clk); x = 20'(xv); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done && cyc < 100) begin @(negedge clk); cyc++; end
      ev = int'($floor($exp(-real'(xv) / 4096.0) * 65536.0 + 0.5));
      err = int'(y) - ev;
      if (err < 0) err = -err;
      checks += 2;
      if (cyc != 21) begin failures++; $display("latency %0d", cyc); end
      if (err > 24) begin failures++; $display("x=%0d y=%0d exp=%0d", xv, y, ev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
