// shallow_nn: shallow neural network that outputs the truncated right
// singular vectors V (N x T) of an M x N input matrix.
//
// Structure: input buffer X (M*N words) -> hidden layer (H neurons,
// pruned multiply/add, LeakyReLU) -> buffer Y_h (H words) -> output layer
// (O = N*T neurons, pruned multiply/add, hard tanh) -> buffer V, which
// turns the output vector Y_O into the N x T matrix (element (r,c) at
// r*T+c). This is the layer chain of the reference architecture; the
// layers run one after the other, one multiply-accumulate per cycle.
// Weights and biases live outside in an nn_memory (layout W_h, b_h, W_O,
// b_O from address 0) reached through mem_raddr/mem_rdata, a synchronous
// read port shared by the two layers.
//
// Interface: the matrix is written element by element through x_we /
// x_addr / x_data (row-major). start (pulse) runs the network; done
// pulses when V is complete. V is read through v_raddr -> v_rdata (one
// cycle latency). skip pulses for every pruned operation.
// Timing: H*(M*N+3) + N*T*(H+3) cycles from start to done.
module shallow_nn
  import nn_pkg::*;
#(
  parameter int          M         = 4,
  parameter int          N         = 80,
  parameter int          H         = 140,
  parameter int          T         = 4,
  parameter int unsigned PRUNE_THR = 0,
  parameter int unsigned BETA_Q    = 655,
  localparam int         L         = M * N,
  localparam int         O         = N * T,
  localparam int         WH_BASE   = 0,
  localparam int         BH_BASE   = H * L,
  localparam int         WO_BASE   = BH_BASE + H,
  localparam int         BO_BASE   = WO_BASE + O * H,
  localparam int         DEPTH     = BO_BASE + O,
  localparam int         AW        = $clog2(DEPTH),
  localparam int         XAW       = $clog2(L),
  localparam int         HAW       = $clog2(H),
  localparam int         VAW       = $clog2(O)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           x_we,
  input  logic [XAW-1:0] x_addr,
  input  data_t          x_data,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [AW-1:0]  mem_raddr,
  input  data_t          mem_rdata,
  input  logic [VAW-1:0] v_raddr,
  output data_t          v_rdata,
  output logic           skip
);
  data_t x_buf  [L];
  data_t yh_buf [H];
  data_t v_buf  [O];

  logic           hid_busy, hid_done, hid_skip;
  logic [AW-1:0]  hid_waddr;
  logic [XAW-1:0] hid_xaddr;
  data_t          hid_xdata;
  logic           hid_ywe;
  logic [HAW-1:0] hid_yaddr;
  data_t          hid_ydata;

  logic           out_busy, out_done, out_skip;
  logic [AW-1:0]  out_waddr;
  logic [HAW-1:0] out_xaddr;
  data_t          out_xdata;
  logic           out_ywe;
  logic [VAW-1:0] out_yaddr;
  data_t          out_ydata;

  fc_layer #(
    .IN_LEN(L), .OUT_LEN(H), .ACT(ACT_LEAKY), .AW(AW),
    .W_BASE(WH_BASE), .B_BASE(BH_BASE), .PRUNE_THR(PRUNE_THR), .BETA_Q(BETA_Q)
  ) u_hidden (
    .clk, .rst_n, .start,
    .busy(hid_busy), .done(hid_done),
    .w_addr(hid_waddr), .w_data(mem_rdata),
    .x_addr(hid_xaddr), .x_data(hid_xdata),
    .y_we(hid_ywe), .y_addr(hid_yaddr), .y_data(hid_ydata),
    .skip(hid_skip)
  );

  fc_layer #(
    .IN_LEN(H), .OUT_LEN(O), .ACT(ACT_HTANH), .AW(AW),
    .W_BASE(WO_BASE), .B_BASE(BO_BASE), .PRUNE_THR(PRUNE_THR), .BETA_Q(BETA_Q)
  ) u_output (
    .clk, .rst_n, .start(hid_done),
    .busy(out_busy), .done(out_done),
    .w_addr(out_waddr), .w_data(mem_rdata),
    .x_addr(out_xaddr), .x_data(out_xdata),
    .y_we(out_ywe), .y_addr(out_yaddr), .y_data(out_ydata),
    .skip(out_skip)
  );

  // Buffers: synchronous reads, like block RAM.
  always_ff @(posedge clk) begin
    if (x_we)    x_buf[x_addr]     <= x_data;
    if (hid_ywe) yh_buf[hid_yaddr] <= hid_ydata;
    if (out_ywe) v_buf[out_yaddr]  <= out_ydata;
    hid_xdata <= x_buf[hid_xaddr];
    out_xdata <= yh_buf[out_xaddr];
    v_rdata   <= v_buf[v_raddr];
  end

  always_comb begin
    mem_raddr = hid_busy ? hid_waddr : out_waddr;
    busy      = hid_busy || out_busy;
    done      = out_done;
    skip      = hid_skip || out_skip;
  end
endmodule
