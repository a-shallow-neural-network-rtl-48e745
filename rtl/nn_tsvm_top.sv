// nn_tsvm_top: tensorial-kernel SVM classifier for 4x4x20 tactile tensors
// with neural-network SVD ("NN-based TSVM", cascade architecture).
//
// Dataflow: a tactile tensor phi (4x4 taxels x 20 time samples) is written
// into the unfolding buffer, either directly or by the pre-processing
// block, which averages a raw 30,000-frame recording down to 20 samples. Its three unfoldings X1 (4x80), X2 (4x80) and
// X3 (20x16) pass one at a time through the MUX/DeMUX into one of two
// shallow networks: NN1 (input 4x80, 140 hidden, output V 80x4) for X1
// and X2, NN2 (input 20x16, 40 hidden, output V 16x2) for X3. Each
// network output V_z is compared with the stored singular vectors of all
// NT training tensors by the kernel unit, giving kernel factors k_z(i)
// that are kept in the kernel memory. Finally the classifier sums
// beta_i * k1(i)*k2(i)*k3(i) + b and outputs the sign as the label.
// The block chain and all sizes follow the reference design; the fixed
// point number format, the load ports, the memory layouts and the control
// order are this implementation's own (see the module headers).
//
// Loading (while idle): ten_* writes tensor element (i1,i2,i3) at
// i1 + 4*i2 + 16*i3. Alternatively raw_* streams a raw recording (one
// 16-taxel frame per raw_valid, raw_first on the first frame, only while
// raw_ready is high); raw_done pulses once the tensor is complete; nn_* writes the NN Memory (NN1 from address 0,
// NN2 from 90,020, each laid out W_h, b_h, W_O, b_O); svm_* writes training singular vectors (672 words
// per tensor: V1, V2, V3 row-major); coef_* writes beta_i (addr < NT) and
// b (addr = NT). All words are signed 16-bit with 12 fraction bits.
// Operation: pulse start; busy stays high until done pulses; label
// (1 = positive class) and score (28 fraction bits) are then valid and
// held. Latency at the defaults is about 0.76 million cycles.
module nn_tsvm_top
  import nn_pkg::*;
#(
  parameter int          NT        = 200,
  parameter int unsigned GAMMA_Q   = 4096,
  parameter int unsigned PRUNE_THR = 0,
  parameter int unsigned BETA_Q    = 655,
  localparam int         I1        = 4,
  localparam int         I2        = 4,
  localparam int         I3        = 20,
  localparam int         H1        = 140,
  localparam int         H2        = 40,
  localparam int         T1        = 4,
  localparam int         T2        = 2,
  localparam int         N1        = I2 * I3,     // NN1 input 4 x 80
  localparam int         M2        = I3,          // NN2 input 20 x 16
  localparam int         N2        = I1 * I2,
  localparam int         TEN_AW    = $clog2(I1*I2*I3),
  localparam int         NN1_DEPTH = H1*I1*N1 + H1 + N1*T1*H1 + N1*T1,
  localparam int         NN2_DEPTH = H2*M2*N2 + H2 + N2*T2*H2 + N2*T2,
  localparam int         NN1_AW    = $clog2(NN1_DEPTH),
  localparam int         NN2_AW    = $clog2(NN2_DEPTH),
  localparam int         NN_DEPTH  = NN1_DEPTH + NN2_DEPTH,
  localparam int         NN_AW     = $clog2(NN_DEPTH),
  localparam int         PER       = 2*N1*T1 + N2*T2,
  localparam int         SVM_AW    = $clog2(NT * PER),
  localparam int         CAW       = $clog2(NT + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ten_we,
  input  logic [TEN_AW-1:0] ten_addr,
  input  data_t             ten_data,
  input  logic              raw_valid,
  input  logic              raw_first,
  input  data_t             raw_frame [I1*I2],
  output logic              raw_ready,
  output logic              raw_done,
  input  logic              nn_we,
  input  logic [NN_AW-1:0]  nn_addr,
  input  data_t             nn_data,
  input  logic              svm_we,
  input  logic [SVM_AW-1:0] svm_addr,
  input  data_t             svm_data,
  input  logic              coef_we,
  input  logic [CAW-1:0]    coef_addr,
  input  data_t             coef_data,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              label,
  output acc_t              score
);
  localparam int IW  = $clog2(NT);
  localparam int VXAW = $clog2(N1*T1);

  // control
  logic s0, s1, unf_start, nn1_start, nn2_start, ker_start, ker_done;
  logic km_we, cls_clear, cls_acc, cls_fin;
  logic [1:0]        km_wz;
  logic [IW-1:0]     km_idx;
  logic [7:0]        ker_n;
  logic [3:0]        ker_t;
  logic [SVM_AW-1:0] ker_vy_base;
  logic [CAW-1:0]    coef_raddr;

  // unfolding stream
  logic              u_valid, u_last;
  logic [TEN_AW-1:0] u_idx;
  data_t             u_x1, u_x2, u_x3, m_data;
  logic              m_nn1_we, m_nn2_we;

  // networks
  logic              nn1_busy, nn1_done, nn1_skip, nn2_busy, nn2_done, nn2_skip;
  logic [NN1_AW-1:0] nn1_raddr;
  logic [NN2_AW-1:0] nn2_raddr;
  logic [NN_AW-1:0]  nn_raddr;
  data_t             nn_rdata, v1_rdata, v2_rdata;

  // kernel
  logic [VXAW-1:0]   vx_addr;
  logic [SVM_AW-1:0] vy_addr;
  data_t             vx_data, vy_data, coef_rdata;
  kval_t             ker_k, km_k1, km_k2, km_k3, km_prod;
  logic              ker_busy;

  // raw recording -> tensor (alternative to ten_*)
  logic              pp_we;
  logic [TEN_AW-1:0] pp_addr;
  data_t             pp_data;

  preprocess #(.P(I3), .I1(I1), .I2(I2)) u_pre (
    .clk, .rst_n,
    .smp_valid(raw_valid), .smp_first(raw_first), .smp_frame(raw_frame),
    .ready(raw_ready), .wr_en(pp_we), .wr_addr(pp_addr), .wr_data(pp_data),
    .done(raw_done)
  );

  tsvm_ctrl #(.NT(NT), .N1(N1), .T1(T1), .N3(N2), .T3(T2)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done,
    .s0, .s1, .unf_start, .unf_last(u_last),
    .nn1_start, .nn1_done, .nn2_start, .nn2_done,
    .ker_start, .ker_n, .ker_t, .ker_vy_base, .ker_done,
    .km_we, .km_wz, .km_idx,
    .coef_raddr, .cls_clear, .cls_acc, .cls_fin
  );

  unfold #(.I1(I1), .I2(I2), .I3(I3)) u_unfold (
    .clk, .rst_n,
    .wr_en(ten_we | pp_we), .wr_addr(pp_we ? pp_addr : ten_addr),
    .wr_data(pp_we ? pp_data : ten_data),
    .start(unf_start), .valid(u_valid), .idx(u_idx), .last(u_last),
    .x1(u_x1), .x2(u_x2), .x3(u_x3)
  );

  matrix_mux u_mux (
    .s0, .s1, .valid_in(u_valid),
    .x1(u_x1), .x2(u_x2), .x3(u_x3),
    .nn1_we(m_nn1_we), .nn2_we(m_nn2_we), .data_out(m_data)
  );

  // One NN Memory for both networks: NN1 from 0, NN2 from NN1_DEPTH.
  // Only one network runs at a time, so S0 steers the single read port.
  assign nn_raddr = s0 ? NN_AW'(NN1_DEPTH + int'(nn2_raddr)) : NN_AW'(nn1_raddr);

  nn_memory #(.DEPTH(NN_DEPTH), .AW(NN_AW)) u_nn_mem (
    .clk, .we(nn_we), .waddr(nn_addr), .wdata(nn_data),
    .raddr(nn_raddr), .rdata(nn_rdata)
  );

  shallow_nn #(.M(I1), .N(N1), .H(H1), .T(T1), .PRUNE_THR(PRUNE_THR), .BETA_Q(BETA_Q)) u_nn1 (
    .clk, .rst_n,
    .x_we(m_nn1_we), .x_addr(u_idx), .x_data(m_data),
    .start(nn1_start), .busy(nn1_busy), .done(nn1_done),
    .mem_raddr(nn1_raddr), .mem_rdata(nn_rdata),
    .v_raddr(vx_addr), .v_rdata(v1_rdata), .skip(nn1_skip)
  );

  shallow_nn #(.M(M2), .N(N2), .H(H2), .T(T2), .PRUNE_THR(PRUNE_THR), .BETA_Q(BETA_Q)) u_nn2 (
    .clk, .rst_n,
    .x_we(m_nn2_we), .x_addr(u_idx), .x_data(m_data),
    .start(nn2_start), .busy(nn2_busy), .done(nn2_done),
    .mem_raddr(nn2_raddr), .mem_rdata(nn_rdata),
    .v_raddr(vx_addr[$clog2(N2*T2)-1:0]), .v_rdata(v2_rdata), .skip(nn2_skip)
  );

  assign vx_data = s0 ? v2_rdata : v1_rdata;

  svm_memory #(.NT(NT), .N1(N1), .T1(T1), .N3(N2), .T3(T2)) u_svm_mem (
    .clk,
    .we(svm_we), .waddr(svm_addr), .wdata(svm_data),
    .raddr(vy_addr), .rdata(vy_data),
    .cwe(coef_we), .caddr(coef_addr), .cdata(coef_data),
    .craddr(coef_raddr), .crdata(coef_rdata)
  );

  kernel_unit #(.GAMMA_Q(GAMMA_Q), .VXAW(VXAW), .VYAW(SVM_AW)) u_kernel (
    .clk, .rst_n, .start(ker_start),
    .n_len(ker_n), .t_len(ker_t), .vy_base(ker_vy_base),
    .vx_addr, .vx_data, .vy_addr, .vy_data,
    .busy(ker_busy), .done(ker_done), .k(ker_k)
  );

  kernel_memory #(.NT(NT)) u_kmem (
    .clk, .we(km_we), .wz(km_wz), .widx(km_idx), .wdata(ker_k),
    .ridx(km_idx), .k1(km_k1), .k2(km_k2), .k3(km_k3), .kprod(km_prod)
  );

  classifier u_cls (
    .clk, .rst_n, .clear(cls_clear),
    .acc_en(cls_acc), .beta(coef_rdata), .kval(km_prod),
    .fin(cls_fin), .bias(coef_rdata),
    .score, .label
  );
endmodule
