// preprocess: reduces a raw tactile recording to the 4 x 4 x P tensor
// (the pre-processing algorithm applied to the tactile recordings).
//
// A recording is a stream of S frames of I1*I2 taxel readings taken over
// REC10 tenths of a second (30,000 frames in 10 s by default). Only the
// frames with index in [V1, V2), V1 = A10*S/REC10 and V2 = B10*S/REC10,
// are kept: the time interval [3.5 s, 7 s) by default, which removes the
// silent start and end of a touch. The S' = V2 - V1 kept frames are cut
// into P = 20 consecutive bins of BIN = S'/P frames (525), and each bin is
// replaced by its per-taxel average, phi(:,:,p) = (P/S') * sum of the
// bin. The average is formed by multiplying the bin sum with
// RECIP = round(2^24 / BIN), adding 2^23 and shifting right by 24 (round
// to nearest; the result is within one LSB of the exact mean).
// Interval, bin count and the averaging follow the pre-processing
// algorithm; the half-open interval, the reciprocal multiply and the
// serial write-out are this implementation's choices.
//
// Interface: smp_valid with smp_frame (taxel (i1,i2) at i1 + I1*i2)
// delivers one frame; smp_first marks the first frame of a recording. At
// the end of each bin the 16 averages are written, one per cycle, through
// wr_en/wr_addr/wr_data to tensor address i1 + I1*i2 + I1*I2*p; ready is
// low during those I1*I2 cycles and no frame may arrive then (asserted).
// done pulses after the last bin has been written. Frames come from a
// sensor interface at a few kHz, so the write-out never stalls it.
module preprocess
  import nn_pkg::*;
#(
  parameter int  S      = 30000,
  parameter int  REC10  = 100,
  parameter int  A10    = 35,
  parameter int  B10    = 70,
  parameter int  P      = 20,
  parameter int  I1     = 4,
  parameter int  I2     = 4,
  localparam int NTAX   = I1 * I2,
  localparam int V1     = A10 * S / REC10,
  localparam int V2     = B10 * S / REC10,
  localparam int BIN    = (V2 - V1) / P,
  localparam int RECIP  = ((1 << 24) + BIN / 2) / BIN,
  localparam int AW     = $clog2(NTAX * P),
  localparam int SW     = $clog2(S + 1),
  localparam int TW     = $clog2(NTAX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          smp_valid,
  input  logic          smp_first,
  input  data_t         smp_frame [NTAX],
  output logic          ready,
  output logic          wr_en,
  output logic [AW-1:0] wr_addr,
  output data_t         wr_data,
  output logic          done
);
  typedef logic signed [31:0] sum_t;

  sum_t            acc [NTAX];
  logic [SW-1:0]   s_cnt;       // frame index within the recording
  logic [15:0]     b_cnt;       // frame index within the current bin
  logic [7:0]      p_cnt;       // bin index
  logic            drain;
  logic [TW-1:0]   t_cnt;       // taxel being written out
  logic [SW-1:0]   idx;
  logic            in_win;
  acc_t            scaled;

  always_comb begin
    idx    = smp_first ? '0 : s_cnt;
    in_win = (int'(idx) >= V1) && (int'(idx) < V2) && (int'(p_cnt) < P);
    ready  = !drain;
    scaled = (acc_t'(acc[t_cnt]) * acc_t'(RECIP) + (acc_t'(1) <<< 23)) >>> 24;
    wr_en  = drain;
    wr_addr = AW'(int'(t_cnt) + NTAX * int'(p_cnt));
    wr_data = sat_data(scaled);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_cnt <= '0;
      b_cnt <= '0;
      p_cnt <= '0;
      drain <= 1'b0;
      t_cnt <= '0;
      done  <= 1'b0;
      for (int t = 0; t < NTAX; t++) acc[t] <= '0;
    end else begin
      done <= 1'b0;
      if (drain) begin
        acc[t_cnt] <= '0;
        if (int'(t_cnt) == NTAX - 1) begin
          t_cnt <= '0;
          drain <= 1'b0;
          p_cnt <= p_cnt + 1'b1;
          if (int'(p_cnt) == P - 1) done <= 1'b1;
        end else begin
          t_cnt <= t_cnt + 1'b1;
        end
      end else if (smp_valid) begin
        s_cnt <= idx + 1'b1;
        if (smp_first) begin
          p_cnt <= '0;
          b_cnt <= '0;
          for (int t = 0; t < NTAX; t++) acc[t] <= '0;
        end
        if (in_win) begin
          for (int t = 0; t < NTAX; t++)
            acc[t] <= (smp_first ? sum_t'(0) : acc[t]) + sum_t'(smp_frame[t]);
          if (int'(b_cnt) == BIN - 1) begin
            b_cnt <= '0;
            drain <= 1'b1;
          end else begin
            b_cnt <= b_cnt + 1'b1;
          end
        end
      end
    end
  end

  // No frame may arrive while a bin is being written out.
  a_no_frame_in_drain: assert property (@(posedge clk) disable iff (!rst_n) smp_valid |-> ready)
    else $error("preprocess: frame arrived during write-out");
endmodule
