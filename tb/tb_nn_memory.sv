// tb_nn_memory: fills a full-size NN Memory (104,172 words, both networks) with a
// pseudo-random pattern, then reads back random and boundary addresses
// and checks the data and the one-cycle read latency.
module tb_nn_memory;
  import nn_pkg::*;
  localparam int DEPTH = 104172;
  localparam int AW = 17;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr, raddr = '0;
  data_t wdata, rdata;
  int checks = 0, failures = 0;

  nn_memory dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic data_t pat(int a);
    return data_t'((a * 40503 + 12345) ^ (a >> 3));
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); we = 1; waddr = AW'(k); wdata = pat(k);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      a = (n == 0) ? 0 : (n == 1) ? DEPTH - 1 : $urandom_range(0, DEPTH - 1);
      raddr = AW'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata != pat(a)) begin failures++; if (failures < 5) $display("addr %0d got %0d", a, rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
