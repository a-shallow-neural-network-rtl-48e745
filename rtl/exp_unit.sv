// exp_unit: sequential exponential y = exp(-x) for x >= 0.
//
// x is unsigned with FRAC (12) fraction bits, y unsigned with KFRAC (16)
// fraction bits. Method: exp(-x) is the product, over the set bits k of
// x, of exp(-2^(k-FRAC)). The constants C[k] = round(exp(-2^(k-12)) *
// 2^16) are listed in exp_const(); for k >= 16 (x >= 16) the factor is
// below one LSB and is zero. One bit is handled per cycle with one
// multiply and a truncating shift, so the result is within a few LSBs of
// the exact value. The reference design does not say how its exponential
// is evaluated; this bit-serial method is this implementation's choice.
// Interface: start (pulse, x sampled), done pulses XW+1 cycles later with
// y valid and held until the next start.
module exp_unit
  import nn_pkg::*;
#(
  parameter int XW = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [XW-1:0] x,
  output logic          busy,
  output logic          done,
  output kval_t         y
);
  localparam int CW = $clog2(XW + 1);

  logic [XW-1:0]   x_q;
  logic [CW-1:0]   bit_cnt;
  logic [2*KW-1:0] prod;

  // round(exp(-2^(k-12)) * 65536)
  function automatic kval_t exp_const(input int b);
    case (b)
      0:  return 17'd65520;
      1:  return 17'd65504;
      2:  return 17'd65472;
      3:  return 17'd65408;
      4:  return 17'd65280;
      5:  return 17'd65026;
      6:  return 17'd64520;
      7:  return 17'd63520;
      8:  return 17'd61565;
      9:  return 17'd57835;
      10: return 17'd51039;
      11: return 17'd39750;
      12: return 17'd24109;
      13: return 17'd8869;
      14: return 17'd1200;
      15: return 17'd22;
      default: return 17'd0;
    endcase
  endfunction

  always_comb prod = y * exp_const(int'(bit_cnt));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      bit_cnt <= '0;
      x_q     <= '0;
      y       <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy    <= 1'b1;
        x_q     <= x;
        bit_cnt <= '0;
        y       <= kval_t'(1 << KFRAC);
      end else if (busy) begin
        if (x_q[bit_cnt[CW-1:0]]) y <= KW'(prod >> KFRAC);
        if (int'(bit_cnt) == XW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
  end
endmodule
