// kernel_unit: one tensorial kernel factor, eq. (3):
//   k = exp( -GAMMA * (t - trace(Z^T Z)) ),  Z = Vx^T Vy,  GAMMA = 1/(2 sigma^2)
//
// Vx (n x t) is the network output for the test tensor, Vy (n x t) the
// stored training singular vectors; both are row-major, element (r,c) at
// r*t+c (Vy offset by vy_base). trace(Z^T Z) is the sum of squares of
// the t*t entries Z[i][j] = sum_r Vx[r][i]*Vy[r][j]; each entry is one
// run of n multiply-accumulates, rescaled to FRAC fraction bits, squared
// and added. t stands for the rank term I_n of eq. (3) (the trace of the
// t x t identity), so identical subspaces give k = 1. The difference is
// clamped at 0 (k <= 1), scaled by GAMMA_Q (FRAC fraction bits) and fed
// to exp_unit. The rank reading of I_n, the clamp, GAMMA's value and the
// sequential schedule are this implementation's choices.
//
// Interface: start (pulse; n_len, t_len, vy_base sampled) -> done pulse
// with k valid (KFRAC fraction bits, held). vx_addr/vy_addr address
// synchronous memories (data one cycle later).
// Timing: t*t*n + 2 cycles of products, 1 cycle of scaling, then the
// exponential (XW+1 cycles).
module kernel_unit
  import nn_pkg::*;
#(
  parameter int unsigned GAMMA_Q = 4096,
  parameter int          VXAW    = 9,
  parameter int          VYAW    = 18,
  parameter int          XW      = 20
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [7:0]      n_len,
  input  logic [3:0]      t_len,
  input  logic [VYAW-1:0] vy_base,
  output logic [VXAW-1:0] vx_addr,
  input  data_t           vx_data,
  output logic [VYAW-1:0] vy_addr,
  input  data_t           vy_data,
  output logic            busy,
  output logic            done,
  output kval_t           k
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_ARG, S_EXP} state_e;

  state_e          state;
  logic [7:0]      n_q, r_cnt;
  logic [3:0]      t_q, i_cnt, j_cnt;
  logic [VYAW-1:0] base_q;
  logic [VXAW-1:0] rx;          // r*t
  logic            vld_q, last_q;
  acc_t            dot, dot_next, dq, acc2, diff;
  logic [ACC_W+16:0] arg_full;
  logic [XW-1:0]   arg;
  logic            exp_start, exp_busy, exp_done;
  kval_t           exp_y;

  exp_unit #(.XW(XW)) u_exp (
    .clk, .rst_n, .start(exp_start), .x(arg),
    .busy(exp_busy), .done(exp_done), .y(exp_y)
  );

  always_comb begin
    vx_addr  = rx + VXAW'(i_cnt);
    vy_addr  = base_q + VYAW'(rx) + VYAW'(j_cnt);
    dot_next = dot + acc_t'($signed(vx_data) * $signed(vy_data));
    dq       = dot_next >>> FRAC;
    busy     = (state != S_IDLE);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      n_q       <= '0;
      t_q       <= '0;
      base_q    <= '0;
      r_cnt     <= '0;
      i_cnt     <= '0;
      j_cnt     <= '0;
      rx        <= '0;
      vld_q     <= 1'b0;
      last_q    <= 1'b0;
      dot       <= '0;
      acc2      <= '0;
      diff      <= '0;
      exp_start <= 1'b0;
      done      <= 1'b0;
      k         <= '0;
    end else begin
      vld_q     <= (state == S_RUN);
      last_q    <= (state == S_RUN) && (r_cnt == n_q - 1'b1);
      exp_start <= 1'b0;
      done      <= 1'b0;

      // data stage: one product per cycle
      if (vld_q) begin
        if (last_q) begin
          acc2 <= acc2 + dq * dq;
          dot  <= '0;
        end else begin
          dot <= dot_next;
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          n_q    <= n_len;
          t_q    <= t_len;
          base_q <= vy_base;
          r_cnt  <= '0;
          i_cnt  <= '0;
          j_cnt  <= '0;
          rx     <= '0;
          dot    <= '0;
          acc2   <= '0;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (r_cnt == n_q - 1'b1) begin
            r_cnt <= '0;
            rx    <= '0;
            if (j_cnt == t_q - 1'b1) begin
              j_cnt <= '0;
              if (i_cnt == t_q - 1'b1) state <= S_DRAIN;
              else i_cnt <= i_cnt + 1'b1;
            end else begin
              j_cnt <= j_cnt + 1'b1;
            end
          end else begin
            r_cnt <= r_cnt + 1'b1;
            rx    <= rx + VXAW'(t_q);
          end
        end
        S_DRAIN: begin
          // last product is absorbed this cycle
          state <= S_ARG;
        end
        S_ARG: begin
          diff <= (acc_t'(t_q) <<< (2*FRAC)) - acc2;
          state <= S_EXP;
          exp_start <= 1'b1;
        end
        S_EXP: if (exp_done) begin
          k     <= exp_y;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // GAMMA * max(diff, 0), rescaled from 2*FRAC+FRAC to FRAC fraction bits
  always_comb begin
    if (diff[ACC_W-1]) arg_full = '0;
    else               arg_full = ((ACC_W+17)'(diff) * (ACC_W+17)'(GAMMA_Q)) >> (2*FRAC);
  end
  assign arg = (arg_full >= (ACC_W+17)'(2**XW - 1)) ? XW'(2**XW - 1) : XW'(arg_full);
endmodule
