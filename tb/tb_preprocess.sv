// tb_preprocess: streams two full-length raw recordings (30,000 frames of
// 16 taxels each, default parameters) into the pre-processing block and
// checks the 4x4x20 tensor it writes out.
// Inside the kept interval [10,500, 21,000) each taxel of bin p carries a
// random per-bin mean plus noise; outside it the frames are large random
// values, so any frame wrongly included moves an average far off. One
// taxel/bin holds values near +32767 and one near -32768 to exercise the
// widest sums. Frames arrive with random idle gaps and are only offered
// while ready is high. Checks per recording: every written value is
// within one LSB of the exact bin mean (computed here as a real number),
// each of the 320 addresses is written exactly once, ready is low for
// exactly 16 cycles per bin, and done pulses once, after the last write.
// The second recording starts with smp_first and checks the restart.
module tb_preprocess;
  import nn_pkg::*;
  localparam int S = 30000, V1 = 10500, V2 = 21000, P = 20, BIN = 525, NTAX = 16;
  logic clk = 0, rst_n = 0, smp_valid = 0, smp_first = 0;
  data_t smp_frame [NTAX];
  logic ready, wr_en, done;
  logic [8:0] wr_addr;
  data_t wr_data;
  int checks = 0, failures = 0;
  longint sum [NTAX][P];
  int mean [NTAX][P];
  int got [NTAX*P];
  int nwr [NTAX*P];
  int n_busy, n_done, wr_after_done;

  preprocess dut (.clk, .rst_n, .smp_valid, .smp_first, .smp_frame, .ready, .wr_en, .wr_addr,
                  .wr_data, .done);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      got[wr_addr] = int'(wr_data);
      nwr[wr_addr]++;
      if (n_done > 0) wr_after_done++;
    end
    if (!ready) n_busy++;
    if (done) n_done++;
  end

  function automatic int clip(int v);
    return v > 32767 ? 32767 : (v < -32768 ? -32768 : v);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rec = 0; rec < 2; rec++) begin
      for (int t = 0; t < NTAX; t++) for (int p = 0; p < P; p++) begin
        mean[t][p] = $signed($urandom_range(0, 6000)) - 3000;
        sum[t][p] = 0;
      end
      mean[3][5] = 32500;
      mean[9][17] = -32500;
      for (int a = 0; a < NTAX*P; a++) begin nwr[a] = 0; got[a] = 0; end
      n_busy = 0; n_done = 0; wr_after_done = 0;
      for (int s = 0; s < S; s++) begin
        @(negedge clk);
        while (!ready || $urandom_range(0, 9) == 0) begin
          smp_valid = 0;
          @(negedge clk);
        end
        for (int t = 0; t < NTAX; t++) begin
          int v, p;
          if (s >= V1 && s < V2) begin
            p = (s - V1) / BIN;
            v = clip(mean[t][p] + $signed($urandom_range(0, 1200)) - 600);
            sum[t][p] += v;
          end else begin
            v = $signed($urandom_range(0, 60000)) - 30000;
          end
          smp_frame[t] = data_t'(v);
        end
        smp_valid = 1;
        smp_first = (s == 0);
      end
      @(negedge clk);
      smp_valid = 0; smp_first = 0;
      repeat (40) @(negedge clk);
      for (int t = 0; t < NTAX; t++) for (int p = 0; p < P; p++) begin
        real exact;
        int a;
        a = t + NTAX * p;
        exact = real'(sum[t][p]) / real'(BIN);
        checks += 2;
        if (nwr[a] != 1) begin
          failures++;
          if (failures < 6) $display("rec %0d addr %0d written %0d times", rec, a, nwr[a]);
        end
        if (real'(got[a]) > exact + 1.0 || real'(got[a]) < exact - 1.0) begin
          failures++;
          if (failures < 6) $display("rec %0d taxel %0d bin %0d: got %0d exact %f", rec, t, p, got[a], exact);
        end
      end
      checks += 3;
      if (n_busy != NTAX * P) begin failures++; $display("ready low for %0d cycles", n_busy); end
      if (n_done != 1) begin failures++; $display("done pulsed %0d times", n_done); end
      if (wr_after_done != 0) begin failures++; $display("%0d writes after done", wr_after_done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
