// fc_layer: one fully connected layer, evaluated sequentially.
//
// For every output neuron j (0..OUT_LEN-1) the layer reads the bias
// b[j] at B_BASE+j, then the weights W[j][i] at W_BASE + j*IN_LEN + i
// together with the input elements x[i], accumulates b[j] + sum W[j][i]x[i]
// in a pruning multiply-accumulate unit, scales the sum back to a data
// word (saturating), applies the activation ACT (LeakyReLU for a hidden
// layer, hard tanh for an output layer) and writes y[j]. This is the
// "matrix multiplication, matrix addition, activation" chain of the
// reference architecture with one MAC per cycle; the memory layout and
// the one-neuron-at-a-time schedule are this implementation's choice.
//
// Interface: start (pulse) -> busy ... done (one-cycle pulse after the
// last y write). w_addr/x_addr are read addresses of synchronous
// memories (data returns the next cycle). y_we/y_addr/y_data write the
// result vector. skip pulses for every pruned bias or weight.
// Timing: IN_LEN + 3 cycles per output neuron, OUT_LEN*(IN_LEN+3) total.
module fc_layer
  import nn_pkg::*;
#(
  parameter int          IN_LEN    = 320,
  parameter int          OUT_LEN   = 140,
  parameter act_e        ACT       = ACT_LEAKY,
  parameter int          AW        = 17,
  parameter int          W_BASE    = 0,
  parameter int          B_BASE    = IN_LEN * OUT_LEN,
  parameter int unsigned PRUNE_THR = 0,
  parameter int unsigned BETA_Q    = 655,
  localparam int         XAW       = (IN_LEN  > 1) ? $clog2(IN_LEN)  : 1,
  localparam int         YAW       = (OUT_LEN > 1) ? $clog2(OUT_LEN) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [AW-1:0]  w_addr,
  input  data_t          w_data,
  output logic [XAW-1:0] x_addr,
  input  data_t          x_data,
  output logic           y_we,
  output logic [YAW-1:0] y_addr,
  output data_t          y_data,
  output logic           skip
);
  typedef enum logic [2:0] {S_IDLE, S_BIAS, S_MAC, S_DRAIN, S_WRITE} state_e;

  state_e         state;
  logic [XAW-1:0] i_cnt;
  logic [YAW-1:0] j_cnt;
  logic [AW-1:0]  wptr;
  logic           bias_q, mac_q;
  acc_t           acc;
  data_t          z, y_leaky, y_htanh;

  prune_mac #(.PRUNE_THR(PRUNE_THR)) u_mac (
    .clk, .rst_n,
    .load_bias(bias_q), .mac(mac_q),
    .coef(w_data), .x(x_data),
    .acc, .skip
  );

  leaky_relu #(.BETA_Q(BETA_Q)) u_fh (.z, .y(y_leaky));
  hard_tanh                     u_fo (.z, .y(y_htanh));

  always_comb begin
    z      = sat_data(acc >>> FRAC);
    y_data = (ACT == ACT_LEAKY) ? y_leaky : y_htanh;
    y_we   = (state == S_WRITE);
    y_addr = j_cnt;
    busy   = (state != S_IDLE);
    x_addr = i_cnt;
    w_addr = (state == S_BIAS) ? AW'(B_BASE + int'(j_cnt)) : wptr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      i_cnt  <= '0;
      j_cnt  <= '0;
      wptr   <= '0;
      bias_q <= 1'b0;
      mac_q  <= 1'b0;
      done   <= 1'b0;
    end else begin
      bias_q <= (state == S_BIAS);
      mac_q  <= (state == S_MAC);
      done   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          j_cnt <= '0;
          wptr  <= AW'(W_BASE);
          state <= S_BIAS;
        end
        S_BIAS: begin
          i_cnt <= '0;
          state <= S_MAC;
        end
        S_MAC: begin
          wptr <= wptr + 1'b1;
          if (int'(i_cnt) == IN_LEN - 1) state <= S_DRAIN;
          else i_cnt <= i_cnt + 1'b1;
        end
        S_DRAIN: state <= S_WRITE;
        S_WRITE: begin
          if (int'(j_cnt) == OUT_LEN - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            j_cnt <= j_cnt + 1'b1;
            state <= S_BIAS;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
