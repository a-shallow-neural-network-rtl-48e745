// tb_unfold: writes a random 4x4x20 tensor, starts the unfolding and
// captures the three element streams. Each element is compared with the
// definition of the mode-n unfolding, computed here from (row, column):
//   X1[r][c] = phi(r, c%4, c/4), X2[r][c] = phi(c%4, r, c/4),
//   X3[r][c] = phi(c%4, c/4, r).
// The stream must be exactly 320 valid cycles with last on the final one,
// starting two cycles after start. Two rounds.
module tb_unfold;
  import nn_pkg::*;
  localparam int I1 = 4, I2 = 4, I3 = 20, L = I1*I2*I3;
  logic clk = 0, rst_n = 0, wr_en = 0, start = 0;
  logic [8:0] wr_addr, idx;
  data_t wr_data, x1, x2, x3;
  logic valid, last;
  int checks = 0, failures = 0;
  int phi [I1][I2][I3];

  unfold dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .start, .valid, .idx, .last, .x1, .x2, .x3);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, n_valid, first;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      for (int a = 0; a < I1; a++) for (int b = 0; b < I2; b++) for (int c = 0; c < I3; c++)
        phi[a][b][c] = $signed($urandom_range(0, 65535)) - 32768;
      for (int c = 0; c < I3; c++) for (int b = 0; b < I2; b++) for (int a = 0; a < I1; a++) begin
        @(negedge clk);
        wr_en = 1; wr_addr = 9'(a + I1*b + I1*I2*c); wr_data = data_t'(phi[a][b][c]);
      end
      @(negedge clk); wr_en = 0; start = 1;
      @(negedge clk); start = 0;
      n_valid = 0; first = -1;
      for (int cyc = 1; cyc < L + 10; cyc++) begin
        if (valid) begin
          int r1, c1, r2, c2, r3, c3;
          if (first < 0) first = cyc;
          e = n_valid;
          r1 = e / 80; c1 = e % 80;
          r2 = e / 80; c2 = e % 80;
          r3 = e / 16; c3 = e % 16;
          checks += 5;
          if (int'(idx) != e) failures++;
          if (int'(x1) != phi[r1][c1 % 4][c1 / 4]) begin failures++; if (failures < 5) $display("X1 e=%0d", e); end
          if (int'(x2) != phi[c2 % 4][r2][c2 / 4]) begin failures++; if (failures < 5) $display("X2 e=%0d", e); end
          if (int'(x3) != phi[c3 % 4][c3 / 4][r3]) begin failures++; if (failures < 5) $display("X3 e=%0d", e); end
          if (last != (e == L - 1)) failures++;
          n_valid++;
        end
        @(negedge clk);
      end
      checks += 2;
      if (n_valid != L) begin failures++; $display("valid count %0d", n_valid); end
      if (first != 2) begin failures++; $display("first valid at %0d", first); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
