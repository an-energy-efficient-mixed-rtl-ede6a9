// thr_win_engine: adaptive thresholds and P/T search windows.
//
// Thresholds. For each scale (2, 3, 4) and each polarity a comparator watches
// the excursions of the coefficient away from zero. When an excursion ends
// (the coefficient changes sign) its peak magnitude is classified: at or above
// the current threshold it becomes the signal peak SP, below it the noise peak
// NP. On every confirmed QRS complex (upd) each threshold moves by a weighted
// average towards the level between noise and signal:
//     thr' = (3*thr + NP + (SP - NP)/2) / 4
// The thesis prints the numerator of this rule; the division by 4 that makes
// it a weighted average is read from its text ("weighted average of the
// current threshold and the new threshold"). The boundary thresholds are the
// scale-2 peak thresholds shifted right by 4, as in the thesis. The P/T wave
// threshold (scale 4 positive threshold >> PT_SHIFT), the initial values and
// the floor THR_MIN are this design's choices.
//
// Windows. On every QRS end the QRSon-to-QRSend interval (in samples) updates
// a running average, avg' = (3*avg + interval)/4 (weights are this design's
// choice). The window rule is
//     SW_pl = min(100, 10 + 0.375 * QRS)   samples before R (left P bound)
//     SW_tr = min(100, 15 + 0.4   * QRS)   samples after R (right T bound)
// with SW_pr = 10 and SW_tl = 15 fixed. This design takes the QRS term in
// milliseconds (4 ms per sample at 250 Hz), i.e. 1.5 * avg and 1.6 * avg in
// samples: read in samples, a normal 100 ms QRS would open a P window of only
// 19 samples (76 ms) before R, too short for a normal PR interval, and the
// 100-sample cap could never be reached. 1.6 is approximated by shifts and
// adds as 51/32 = 1.59375, truncated once at the end.
//
// Timing: thresholds and windows change on the clock after upd / qrs_end.
`timescale 1ns/1ps
module thr_win_engine
  import ecg_pkg::*;
#(
  parameter thr_t        THR_INIT  = 12'd200,
  parameter thr_t        THR_MIN   = 12'd16,
  parameter int unsigned PT_SHIFT  = 2,
  parameter int unsigned AVG_INIT  = 22        // initial QRS width, samples
) (
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t w [3],          // scales 2, 3, 4
  input  logic  upd,            // QRS confirmed: update thresholds
  input  fid_t  qrs_on,         // onset of the current beat
  input  fid_t  qrs_end,        // end of the current beat: update windows
  output thr_t  thr_p [3],
  output thr_t  thr_n [3],
  output thr_t  thr_b_p,
  output thr_t  thr_b_n,
  output thr_t  thr_pt,
  output logic [7:0] sw_pl,
  output logic [7:0] sw_tr,
  output logic  sw_clamped       // a window hit the 100-sample cap at the last update
);

  typedef logic [THR_W+2:0] acc_t;

  // ---------------- threshold update, one lane per scale and polarity -------
  // lane index: 2*k + 0 positive, 2*k + 1 negative
  thr_t ex_pk [6];              // peak of the running excursion
  thr_t sp    [6];
  thr_t np    [6];
  thr_t thr   [6];

  function automatic thr_t next_thr(input thr_t t, input thr_t s, input thr_t n);
    acc_t a;
    acc_t half;
    half = (s >= n) ? ((acc_t'(s) - acc_t'(n)) >> 1) : '0;
    a = ((acc_t'(t) << 1) + acc_t'(t) + acc_t'(n) + half) >> 2;
    if (a < acc_t'(THR_MIN))         return THR_MIN;
    else if (a > acc_t'({THR_W{1'b1}})) return '1;
    else                             return thr_t'(a);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_pk <= '{default: '0};
      sp    <= '{default: THR_INIT};
      np    <= '{default: '0};
      thr   <= '{default: THR_INIT};
    end else begin
      for (int k = 0; k < 3; k++) begin
        for (int p = 0; p < 2; p++) begin
          automatic int unsigned i = unsigned'(2*k + p);
          automatic logic on  = (p == 0) ? (w[k] > 0) : (w[k] < 0);
          automatic thr_t mag = (p == 0) ? thr_t'(w[k]) : thr_t'(-w[k]);
          if (on) begin
            if (mag > ex_pk[i]) ex_pk[i] <= mag;
          end else if (ex_pk[i] != '0) begin
            // excursion over: classify its peak against the current threshold
            if (ex_pk[i] >= thr[i]) sp[i] <= ex_pk[i];
            else                    np[i] <= ex_pk[i];
            ex_pk[i] <= '0;
          end
          if (upd) thr[i] <= next_thr(thr[i], sp[i], np[i]);
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      thr_p[k] = thr[2*k];
      thr_n[k] = thr[2*k+1];
    end
    thr_b_p = thr[0] >> 4;
    thr_b_n = thr[1] >> 4;
    thr_pt  = thr[4] >> PT_SHIFT;
  end

  // ---------------- search-window update ----------------
  logic [9:0] avg;
  loc_t       on_loc;
  logic [9:0] width;
  logic [10:0] pl_raw, tr_raw;

  always_comb begin
    width  = 10'((qrs_end.loc - on_loc) > loc_t'(1023) ? loc_t'(1023) : (qrs_end.loc - on_loc));
    // interval in ms = 4 * avg: 0.375 * 4 = 3/2, 0.4 * 4 = 1.6 ~ 51/32 = (32+16+2+1)/32
    pl_raw = 11'(SW_PR) + 11'(((12'(avg) << 1) + 12'(avg)) >> 1);
    tr_raw = 11'(SW_TL) + 11'(((16'(avg) << 5) + (16'(avg) << 4) + (16'(avg) << 1) + 16'(avg)) >> 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      avg    <= 10'(AVG_INIT);
      on_loc <= '0;
    end else begin
      if (qrs_on.valid) on_loc <= qrs_on.loc;
      if (qrs_end.valid)
        avg <= 10'(((12'(avg) << 1) + 12'(avg) + 12'(width)) >> 2);
    end
  end

  assign sw_pl      = (pl_raw > 11'(SW_MAX)) ? 8'(SW_MAX) : pl_raw[7:0];
  assign sw_tr      = (tr_raw > 11'(SW_MAX)) ? 8'(SW_MAX) : tr_raw[7:0];
  assign sw_clamped = (pl_raw > 11'(SW_MAX)) || (tr_raw > 11'(SW_MAX));

endmodule
