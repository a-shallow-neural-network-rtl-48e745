// unfold: tensor buffer and mode-n unfolding of an I1 x I2 x I3 tensor.
//
// The tensor (a 4x4 taxel frame per time sample, 20 samples by default)
// is written element by element, element (i1,i2,i3) at address
// i1 + I1*i2 + I1*I2*i3. After start, the three unfoldings
//   X1 (I1 x I2*I3), column i2 + I2*i3
//   X2 (I2 x I1*I3), column i1 + I1*i3
//   X3 (I3 x I1*I2), column i1 + I1*i2
// are streamed in parallel, one element of each per cycle, in row-major
// order. Each matrix has its own nested (row, column) counters that
// generate the tensor address, so no divider is needed; the buffer has
// three synchronous read ports. Which index varies fastest along a column
// is this design's choice.
// Timing: valid is high for I1*I2*I3 consecutive cycles, the first one
// two clock edges after the edge that samples start (one edge to start the
// counters, one for the read); idx counts the element (row*cols + col) and last marks the final
// one.
module unfold
  import nn_pkg::*;
#(
  parameter int  I1 = 4,
  parameter int  I2 = 4,
  parameter int  I3 = 20,
  localparam int L  = I1 * I2 * I3,
  localparam int AW = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  data_t         wr_data,
  input  logic          start,
  output logic          valid,
  output logic [AW-1:0] idx,
  output logic          last,
  output data_t         x1,
  output data_t         x2,
  output data_t         x3
);
  // One nested counter: outer (row), mid and inner (column digits).
  typedef struct packed {
    logic [7:0] o;
    logic [7:0] m;
    logic [7:0] n;
  } cnt3_t;

  data_t         ten [L];
  logic          run;
  logic [AW-1:0] ecnt;
  cnt3_t         c1, c2, c3;
  logic [AW-1:0] a1, a2, a3;

  function automatic cnt3_t step(input cnt3_t c, input int no, input int nm, input int nn);
    cnt3_t r;
    r = c;
    if (int'(c.n) == nn - 1) begin
      r.n = '0;
      if (int'(c.m) == nm - 1) begin
        r.m = '0;
        r.o = (int'(c.o) == no - 1) ? '0 : c.o + 1'b1;
      end else begin
        r.m = c.m + 1'b1;
      end
    end else begin
      r.n = c.n + 1'b1;
    end
    return r;
  endfunction

  always_comb begin
    // X1: row i1 (o), column i2 (n) + I2*i3 (m)
    a1 = AW'(int'(c1.o) + I1 * int'(c1.n) + I1 * I2 * int'(c1.m));
    // X2: row i2 (o), column i1 (n) + I1*i3 (m)
    a2 = AW'(int'(c2.n) + I1 * int'(c2.o) + I1 * I2 * int'(c2.m));
    // X3: row i3 (o), column i1 (n) + I1*i2 (m)
    a3 = AW'(int'(c3.n) + I1 * int'(c3.m) + I1 * I2 * int'(c3.o));
  end

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_addr) < L) ten[wr_addr] <= wr_data;
    x1 <= ten[a1];
    x2 <= ten[a2];
    x3 <= ten[a3];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run   <= 1'b0;
      ecnt  <= '0;
      c1    <= '0;
      c2    <= '0;
      c3    <= '0;
      valid <= 1'b0;
      last  <= 1'b0;
      idx   <= '0;
    end else begin
      valid <= run;
      last  <= run && (int'(ecnt) == L - 1);
      idx   <= ecnt;
      if (start && !run) begin
        run  <= 1'b1;
        ecnt <= '0;
        c1   <= '0;
        c2   <= '0;
        c3   <= '0;
      end else if (run) begin
        c1 <= step(c1, I1, I3, I2);
        c2 <= step(c2, I2, I3, I1);
        c3 <= step(c3, I3, I2, I1);
        if (int'(ecnt) == L - 1) run <= 1'b0;
        else ecnt <= ecnt + 1'b1;
      end
    end
  end
endmodule
