// svm_memory: training data of the tensorial SVM ("SVM Memory").
//
// Holds, for each of the NT training tensors, the truncated right
// singular vectors of its three unfoldings: V1 (N1 x T1), V2 (N1 x T1)
// and V3 (N3 x T3), stored row-major, element (r,c) at r*T+c, from word
// i*PER_TENSOR (V1 at +0, V2 at +N1*T1, V3 at +2*N1*T1). A second, small
// array holds the SVM coefficients beta_i (caddr < NT) and the bias b
// (caddr = NT). Both have a write port for loading and a synchronous
// read port (data one cycle after the address).
module svm_memory
  import nn_pkg::*;
#(
  parameter int NT         = 200,
  parameter int N1         = 80,
  parameter int T1         = 4,
  parameter int N3         = 16,
  parameter int T3         = 2,
  localparam int PER_TENSOR = 2*N1*T1 + N3*T3,
  localparam int DEPTH      = NT * PER_TENSOR,
  localparam int AW         = $clog2(DEPTH),
  localparam int CAW        = $clog2(NT + 1)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  data_t          wdata,
  input  logic [AW-1:0]  raddr,
  output data_t          rdata,
  input  logic           cwe,
  input  logic [CAW-1:0] caddr,
  input  data_t          cdata,
  input  logic [CAW-1:0] craddr,
  output data_t          crdata
);
  data_t vmem [DEPTH];
  data_t cmem [NT+1];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) vmem[waddr] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? vmem[raddr] : '0;
    if (cwe && int'(caddr) <= NT) cmem[caddr] <= cdata;
    crdata <= (int'(craddr) <= NT) ? cmem[craddr] : '0;
  end
endmodule
