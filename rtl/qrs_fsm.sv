// qrs_fsm: QRS candidate detector for one wavelet scale.
//
// A QRS complex appears in a wavelet scale as a pair of opposite peaks, both
// beyond their thresholds, with a zero crossing between them. This machine
// follows the coefficient stream sample by sample: it waits for a first peak
// beyond the positive or negative threshold, follows it to the zero crossing,
// then waits for the opposite peak to pass its threshold and to fall back
// below it. It then pulses cand with the zero-crossing index and the two peak
// magnitudes. The thesis gives this behaviour (peak, zero crossing, opposite
// peak, candidate mark); its state diagram is not reproduced there, so the
// states, the return-below-threshold end condition and the PAIR_MAX time-out
// (drop a pair whose second peak does not come in time) are this design's own.
//
// Thresholds are magnitudes: a negative peak qualifies when -coef >= thr_n.
// Timing: one coefficient per clock; cand is a one-cycle strobe, issued on the
// clock after the opposite peak falls back below its threshold.
`timescale 1ns/1ps
module qrs_fsm
  import ecg_pkg::*;
#(
  parameter int unsigned PAIR_MAX = 40    // samples allowed from first peak to end of pair
) (
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t coef,
  input  loc_t  loc,        // sample index of coef
  input  thr_t  thr_p,
  input  thr_t  thr_n,
  output logic  busy,       // a peak pair is being followed
  output logic  cand,       // one-cycle candidate strobe
  output loc_t  zc_loc,     // zero crossing of the candidate pair
  output thr_t  pk_pos,     // magnitude of its positive peak
  output thr_t  pk_neg      // magnitude of its negative peak
);

  typedef enum logic [1:0] {IDLE, PEAK1, PEAK2} state_e;

  state_e state;
  logic   pol;              // polarity of the first peak: 1 = positive
  logic   hit2;             // opposite peak has passed its threshold
  logic [$clog2(PAIR_MAX+1)-1:0] timer;
  thr_t   pk1, pk2;
  loc_t   zc;

  // magnitudes of the coefficient on each side (0 on the other side)
  thr_t mag_p, mag_n;
  always_comb begin
    mag_p = (coef > 0) ? thr_t'(coef) : '0;
    mag_n = (coef < 0) ? thr_t'(-coef) : '0;
  end

  logic over_p, over_n;
  assign over_p = (mag_p >= thr_p) && (thr_p != '0);
  assign over_n = (mag_n >= thr_n) && (thr_n != '0);

  assign busy = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      pol    <= 1'b0;
      hit2   <= 1'b0;
      timer  <= '0;
      pk1    <= '0;
      pk2    <= '0;
      zc     <= '0;
      cand   <= 1'b0;
      zc_loc <= '0;
      pk_pos <= '0;
      pk_neg <= '0;
    end else begin
      cand <= 1'b0;
      case (state)
        IDLE: begin
          timer <= '0;
          hit2  <= 1'b0;
          pk2   <= '0;
          if (over_p) begin
            state <= PEAK1; pol <= 1'b1; pk1 <= mag_p;
          end else if (over_n) begin
            state <= PEAK1; pol <= 1'b0; pk1 <= mag_n;
          end
        end
        PEAK1: begin
          timer <= timer + 1'b1;
          if (pol ? (coef < 0) : (coef > 0)) begin
            // zero crossing: the first sample of the opposite sign
            state <= PEAK2;
            zc    <= loc;
            pk2   <= pol ? mag_n : mag_p;
            hit2  <= pol ? over_n : over_p;
          end else if (timer >= PAIR_MAX[$bits(timer)-1:0]) begin
            state <= IDLE;
          end else if (pol ? (mag_p > pk1) : (mag_n > pk1)) begin
            pk1 <= pol ? mag_p : mag_n;
          end
        end
        PEAK2: begin
          timer <= timer + 1'b1;
          if (pol ? (mag_n > pk2) : (mag_p > pk2)) pk2 <= pol ? mag_n : mag_p;
          if (pol ? over_n : over_p) begin
            hit2 <= 1'b1;
          end else if (hit2) begin
            // opposite peak has passed and fallen back: candidate found
            state  <= IDLE;
            cand   <= 1'b1;
            zc_loc <= zc;
            pk_pos <= pol ? pk1 : pk2;
            pk_neg <= pol ? pk2 : pk1;
          end else if ((pol ? (coef > 0) : (coef < 0)) ||
                       timer >= PAIR_MAX[$bits(timer)-1:0]) begin
            // back to the first polarity, or too slow: not a QRS pair
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
