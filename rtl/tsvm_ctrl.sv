// tsvm_ctrl: sequencer of the cascade tensorial-SVM datapath.
//
// One classification runs as follows. For each unfolding z = 1, 2, 3:
//   LOAD   start the unfolding stream with the MUX/DeMUX selects set
//          for z (S0=0,S1=0: X1->NN1; S0=0,S1=1: X2->NN1; S0=1: X3->NN2)
//          and wait until the last element has been written;
//   NN     start the network (NN1 for z = 1, 2, NN2 for z = 3), wait done;
//   KER    for every training tensor i = 0..NT-1 run the kernel unit on
//          the network output and V_z of tensor i, and store k_z(i) in the
//          kernel memory.
// Then CLS reads k1*k2*k3 and beta_i for every i (one per cycle, read
// latency one cycle) into the classifier, reads b and finishes, and done
// pulses. The datapath blocks are reused for every unfolding and every
// training tensor, as in a cascade architecture; the exact order of the
// steps is this design's choice.
// Interface: start/busy/done; start/done handshakes to each block.
module tsvm_ctrl
  import nn_pkg::*;
#(
  parameter int  NT   = 200,
  parameter int  N1   = 80,
  parameter int  T1   = 4,
  parameter int  N3   = 16,
  parameter int  T3   = 2,
  localparam int PER  = 2*N1*T1 + N3*T3,
  localparam int VYAW = $clog2(NT * PER),
  localparam int IW   = $clog2(NT),
  localparam int CAW  = $clog2(NT + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // unfolding and selects
  output logic            s0,
  output logic            s1,
  output logic            unf_start,
  input  logic            unf_last,
  // networks
  output logic            nn1_start,
  input  logic            nn1_done,
  output logic            nn2_start,
  input  logic            nn2_done,
  // kernel unit
  output logic            ker_start,
  output logic [7:0]      ker_n,
  output logic [3:0]      ker_t,
  output logic [VYAW-1:0] ker_vy_base,
  input  logic            ker_done,
  // kernel memory
  output logic            km_we,
  output logic [1:0]      km_wz,
  output logic [IW-1:0]   km_idx,
  // classifier and SVM coefficients
  output logic [CAW-1:0]  coef_raddr,
  output logic            cls_clear,
  output logic            cls_acc,
  output logic            cls_fin
);
  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_WLOAD, S_NN, S_WNN, S_KER, S_WKER, S_CLS, S_BIAS, S_FIN
  } state_e;

  state_e          state;
  logic [1:0]      z;
  logic [IW-1:0]   i_cnt;
  logic [VYAW-1:0] base;     // i*PER + offset of V_z
  logic            acc_q;

  always_comb begin
    busy        = (state != S_IDLE);
    s0          = (z == 2'd2);
    s1          = (z == 2'd1);
    unf_start   = (state == S_LOAD);
    nn1_start   = (state == S_NN) && !s0;
    nn2_start   = (state == S_NN) &&  s0;
    ker_start   = (state == S_KER);
    ker_n       = s0 ? 8'(N3) : 8'(N1);
    ker_t       = s0 ? 4'(T3) : 4'(T1);
    ker_vy_base = base;
    km_we       = (state == S_WKER) && ker_done;
    km_wz       = z;
    km_idx      = i_cnt;
    coef_raddr  = (state == S_BIAS) ? CAW'(NT) : CAW'(i_cnt);
    cls_clear   = (state == S_IDLE) && start;
    cls_acc     = acc_q;
    cls_fin     = (state == S_FIN);
  end

  function automatic logic [VYAW-1:0] v_offset(input logic [1:0] zz);
    case (zz)
      2'd0:    return '0;
      2'd1:    return VYAW'(N1*T1);
      default: return VYAW'(2*N1*T1);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      z     <= '0;
      i_cnt <= '0;
      base  <= '0;
      acc_q <= 1'b0;
      done  <= 1'b0;
    end else begin
      done  <= 1'b0;
      acc_q <= (state == S_CLS);
      unique case (state)
        S_IDLE: if (start) begin
          z     <= '0;
          state <= S_LOAD;
        end
        S_LOAD:  state <= S_WLOAD;
        S_WLOAD: if (unf_last) state <= S_NN;
        S_NN:    state <= S_WNN;
        S_WNN: if ((s0 && nn2_done) || (!s0 && nn1_done)) begin
          i_cnt <= '0;
          base  <= v_offset(z);
          state <= S_KER;
        end
        S_KER:   state <= S_WKER;
        S_WKER: if (ker_done) begin
          if (int'(i_cnt) == NT - 1) begin
            i_cnt <= '0;
            if (z == 2'd2) begin
              state <= S_CLS;
            end else begin
              z     <= z + 1'b1;
              state <= S_LOAD;
            end
          end else begin
            i_cnt <= i_cnt + 1'b1;
            base  <= base + VYAW'(PER);
            state <= S_KER;
          end
        end
        S_CLS: begin
          if (int'(i_cnt) == NT - 1) state <= S_BIAS;
          else i_cnt <= i_cnt + 1'b1;
        end
        S_BIAS: state <= S_FIN;
        S_FIN: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
