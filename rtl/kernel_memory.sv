// kernel_memory: store of kernel factors and their product ("Kernel
// Memory" followed by the multiplier that forms K from k1, k2, k3).
//
// Three banks of NT unsigned kernel values (KFRAC fraction bits), one per
// unfolding z = 1..3 (wz = 0..2). A write stores k_z of training tensor
// widx. A read of index ridx returns k1, k2, k3 of that tensor one cycle
// later (synchronous read) together with the combinational product
// kprod = k1*k2*k3 of eq. (2), each multiply truncated to KFRAC fraction
// bits. Keeping all NT factors of each unfolding lets the cascade run
// each network once per unfolding; that organisation is this design's
// choice.
module kernel_memory
  import nn_pkg::*;
#(
  parameter int NT  = 200,
  localparam int IW = $clog2(NT)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [1:0]    wz,
  input  logic [IW-1:0] widx,
  input  kval_t         wdata,
  input  logic [IW-1:0] ridx,
  output kval_t         k1,
  output kval_t         k2,
  output kval_t         k3,
  output kval_t         kprod
);
  kval_t bank1 [NT];
  kval_t bank2 [NT];
  kval_t bank3 [NT];
  logic [2*KW-1:0] p12, p123;
  kval_t           k12;

  always_ff @(posedge clk) begin
    if (we && int'(widx) < NT) begin
      unique case (wz)
        2'd0:    bank1[widx] <= wdata;
        2'd1:    bank2[widx] <= wdata;
        default: bank3[widx] <= wdata;
      endcase
    end
    k1 <= bank1[ridx];
    k2 <= bank2[ridx];
    k3 <= bank3[ridx];
  end

  always_comb begin
    p12   = k1 * k2;
    k12   = KW'(p12 >> KFRAC);
    p123  = k12 * k3;
    kprod = KW'(p123 >> KFRAC);
  end
endmodule
