// nn_case_runner: testbench helper that exercises one shallow_nn
// configuration (input M x N, H hidden neurons, output V of N x T) once:
// random weights (10% zero) are written into an nn_memory, a random input
// matrix into the network, the network is run, the start-to-done latency
// is compared with H*(M*N+3) + N*T*(H+3) + 2 cycles and every element of V
// with the integer model of tb_ref_pkg. Results are returned on checks /
// failures when finished rises.
module nn_case_runner
  import nn_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int M = 4,
  parameter int N = 80,
  parameter int H = 140,
  parameter int T = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   latency
);
  localparam int L = M*N, O = N*T;
  localparam int DEPTH = H*L + H + O*H + O;
  localparam int AW = $clog2(DEPTH);

  logic x_we = 0, mem_we = 0, start = 0;
  logic [$clog2(L)-1:0] x_addr = '0;
  logic [AW-1:0]        mem_waddr = '0, mem_raddr;
  logic [$clog2(O)-1:0] v_raddr = '0;
  data_t x_data = '0, mem_wdata = '0, mem_rdata, v_rdata;
  logic busy, done, skip;

  nn_memory #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(mem_raddr), .rdata(mem_rdata));
  shallow_nn #(.M(M), .N(N), .H(H), .T(T)) dut (
    .clk, .rst_n, .x_we, .x_addr, .x_data, .start, .busy, .done,
    .mem_raddr, .mem_rdata, .v_raddr, .v_rdata, .skip);

  function automatic int rnd(int span);
    if ($urandom_range(0, 99) < 10) return 0;
    return $signed($urandom_range(0, 2*span)) - span;
  endfunction

  initial begin
    int x[], wh[], bh[], wo[], bo[], yh[], yo[];
    int cyc, so;
    finished = 0; checks = 0; failures = 0; latency = 0;
    wait (go);
    x = new[L]; wh = new[H*L]; bh = new[H]; wo = new[O*H]; bo = new[O];
    so = int'(1400.0 / $sqrt(real'(H) / 40.0));
    foreach (x[k])  x[k]  = rnd(2048);
    foreach (wh[k]) wh[k] = rnd(1200);
    foreach (bh[k]) bh[k] = rnd(1000);
    foreach (wo[k]) wo[k] = rnd(so);
    foreach (bo[k]) bo[k] = rnd(600);
    for (int k = 0; k < DEPTH; k++) begin
      int v;
      if (k < H*L) v = wh[k];
      else if (k < H*L + H) v = bh[k - H*L];
      else if (k < H*L + H + O*H) v = wo[k - H*L - H];
      else v = bo[k - H*L - H - O*H];
      @(negedge clk); mem_we = 1; mem_waddr = AW'(k); mem_wdata = data_t'(v);
    end
    for (int k = 0; k < L; k++) begin
      @(negedge clk); mem_we = 0; x_we = 1; x_addr = $bits(x_addr)'(k); x_data = data_t'(x[k]);
    end
    @(negedge clk); x_we = 0; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    latency = cyc;
    checks++;
    if (cyc != H*(L+3) + O*(H+3) + 2) failures++;
    layer(x, wh, bh, L, H, 1'b0, yh);
    layer(yh, wo, bo, H, O, 1'b1, yo);
    for (int k = 0; k < O; k++) begin
      v_raddr = $bits(v_raddr)'(k);
      @(negedge clk);
      checks++;
      if (int'(v_rdata) != yo[k]) failures++;
    end
    finished = 1;
  end
endmodule
