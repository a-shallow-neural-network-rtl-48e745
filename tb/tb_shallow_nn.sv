// tb_shallow_nn: a reduced network (input 3x5, 6 hidden, output 5x2) with
// random weights, biases and inputs (about 15% zero, to exercise pruning)
// held in an nn_memory. The input matrix is written through the x port,
// the network is run, and every element of V is read back and compared
// with the two-layer integer model of tb_ref_pkg. The start-to-done
// latency is checked against H*(M*N+3) + N*T*(H+3) + 2 cycles. Three
// random rounds.
module tb_shallow_nn;
  import nn_pkg::*;
  import tb_ref_pkg::*;
  localparam int M = 3, N = 5, H = 6, T = 2;
  localparam int L = M*N, O = N*T;
  localparam int DEPTH = H*L + H + O*H + O;
  localparam int AW = $clog2(DEPTH);

  logic clk = 0, rst_n = 0, start = 0, x_we = 0, mem_we = 0;
  logic [$clog2(L)-1:0] x_addr;
  logic [AW-1:0]        mem_waddr, mem_raddr;
  logic [$clog2(O)-1:0] v_raddr = '0;
  data_t x_data, mem_wdata, mem_rdata, v_rdata;
  logic busy, done, skip;
  int checks = 0, failures = 0, n_skip = 0, n_sat = 0, n_neg = 0;

  nn_memory #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(mem_raddr), .rdata(mem_rdata));
  shallow_nn #(.M(M), .N(N), .H(H), .T(T)) dut (
    .clk, .rst_n, .x_we, .x_addr, .x_data, .start, .busy, .done,
    .mem_raddr, .mem_rdata, .v_raddr, .v_rdata, .skip);

  always #5 clk = ~clk;
  always @(posedge clk) if (skip) n_skip++;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(int span);
    if ($urandom_range(0, 99) < 15) return 0;
    return $signed($urandom_range(0, 2*span)) - span;
  endfunction

  initial begin
    int x[], wh[], bh[], wo[], bo[], yh[], yo[], mem[];
    int cyc;
    x = new[L]; wh = new[H*L]; bh = new[H]; wo = new[O*H]; bo = new[O]; mem = new[DEPTH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      foreach (x[k])  x[k]  = rnd(6000);
      foreach (wh[k]) wh[k] = rnd(3000);
      foreach (bh[k]) bh[k] = rnd(2000);
      foreach (wo[k]) wo[k] = rnd(6000);
      foreach (bo[k]) bo[k] = rnd(2000);
      foreach (wh[k]) mem[k] = wh[k];
      foreach (bh[k]) mem[H*L + k] = bh[k];
      foreach (wo[k]) mem[H*L + H + k] = wo[k];
      foreach (bo[k]) mem[H*L + H + O*H + k] = bo[k];
      for (int k = 0; k < DEPTH; k++) begin
        @(negedge clk); mem_we = 1; mem_waddr = AW'(k); mem_wdata = data_t'(mem[k]);
      end
      for (int k = 0; k < L; k++) begin
        @(negedge clk); mem_we = 0; x_we = 1; x_addr = $bits(x_addr)'(k); x_data = data_t'(x[k]);
      end
      @(negedge clk); x_we = 0; start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != H*(L+3) + O*(H+3) + 2) begin
        failures++; $display("latency %0d expected %0d", cyc, H*(L+3) + O*(H+3) + 2);
      end
      layer(x, wh, bh, L, H, 1'b0, yh);
      layer(yh, wo, bo, H, O, 1'b1, yo);
      foreach (yh[k]) if (yh[k] < 0) n_neg++;
      for (int k = 0; k < O; k++) begin
        if (yo[k] == 4096 || yo[k] == -4096) n_sat++;
        v_raddr = $bits(v_raddr)'(k);
        @(negedge clk);
        checks++;
        if (int'(v_rdata) != yo[k]) begin
          failures++; $display("V[%0d] got %0d exp %0d", k, v_rdata, yo[k]);
        end
      end
    end
    if (n_skip == 0 || n_sat == 0 || n_neg == 0) begin
      failures++; $display("coverage skip=%0d sat=%0d neg=%0d", n_skip, n_sat, n_neg);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
