// nn_memory: weight and bias store of the shallow networks ("NN Memory").
//
// A single-port-write, single-port-read RAM of DEPTH data words, as the
// trained matrices are held on chip in block RAM. Each network's region
// is laid out W_h (H x m*n, row-major), b_h (H), W_O (O x H, row-major),
// b_O (O) back to back. The write port loads the trained values; the read
// port is synchronous (rdata valid one cycle after raddr), like a block
// RAM. The default depth holds both networks of the classifier: NN1
// (4x80 input, H = 140, O = 320, 90,020 words) followed by NN2 (20x16
// input, H = 40, O = 32, 14,152 words).
module nn_memory
  import nn_pkg::*;
#(
  parameter int DEPTH = (140*320 + 140 + 320*140 + 320) + (40*320 + 40 + 32*40 + 32),
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  data_t         wdata,
  input  logic [AW-1:0] raddr,
  output data_t         rdata
);
  data_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (int'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
