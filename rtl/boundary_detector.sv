// boundary_detector: QRS onset and end detection on scale 2.
//
// A QRS boundary is where the scale-2 coefficient stays inside the boundary
// band (-thr_b_n, thr_b_p) for RUN_LEN consecutive samples. One set of
// comparators serves both boundaries, as in the thesis:
//  * ON mode (always, before a beat): every sample that closes such a run is
//    kept as the QRS-onset candidate. The candidate is frozen from the moment
//    the scale-2 QRS machine starts following a peak (hold) until the beat is
//    confirmed or dropped (release), so it is the run nearest before the R peak.
//    On r_det the candidate is reported as QRSon, without any search back.
//  * END mode (after r_det): the first run found is reported as QRSend at its
//    first sample. To reject the false boundary inside a wide (ventricular)
//    complex, a run only counts while scale 4 is also below its peak
//    thresholds. If no end is found in END_MAX samples, QRSend is reported at
//    that point and end_timeout pulses.
// RUN_LEN, END_MAX and the exact use of scale 4 are this design's choices: the
// thesis says only "continuous samples under the boundary threshold" and that
// scale 4 is used to tell a wide complex.
//
// Timing: one sample per clock; qrs_on and qrs_end are one-cycle strobes.
`timescale 1ns/1ps
module boundary_detector
  import ecg_pkg::*;
#(
  parameter int unsigned RUN_LEN = 3,
  parameter int unsigned END_MAX = 50
) (
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t w2,
  input  coef_t w4,
  input  loc_t  loc,         // sample index of w2 / w4
  input  thr_t  thr_b_p,     // scale-2 boundary thresholds (magnitudes)
  input  thr_t  thr_b_n,
  input  thr_t  thr4_p,      // scale-4 peak thresholds (magnitudes)
  input  thr_t  thr4_n,
  input  logic  hold,        // scale-2 QRS machine busy
  input  logic  release_i,   // beat dropped without a decision
  input  logic  r_det,       // R peak confirmed
  output fid_t  qrs_on,
  output fid_t  qrs_end,
  output logic  end_timeout
);

  typedef enum logic {MODE_ON, MODE_END} mode_e;

  localparam int unsigned RUN_W = 8;

  mode_e            mode;
  logic [RUN_W-1:0] run;         // length of the current in-band run (saturating)
  loc_t             on_cand;
  logic             frozen;
  logic [$clog2(END_MAX+1)-1:0] tmr;

  logic in_band, wide_quiet, in_run;
  always_comb begin
    in_band    = ($signed({w2[COEF_W-1], w2}) <  $signed({1'b0, thr_b_p})) &&
                 ($signed({w2[COEF_W-1], w2}) > -$signed({1'b0, thr_b_n}));
    wide_quiet = ($signed({w4[COEF_W-1], w4}) <  $signed({1'b0, thr4_p})) &&
                 ($signed({w4[COEF_W-1], w4}) > -$signed({1'b0, thr4_n}));
    in_run     = in_band && (run >= RUN_W'(RUN_LEN - 1));   // this sample closes a run
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= MODE_ON;
      run         <= '0;
      on_cand     <= '0;
      frozen      <= 1'b0;
      tmr         <= '0;
      qrs_on      <= '0;
      qrs_end     <= '0;
      end_timeout <= 1'b0;
    end else begin
      qrs_on.valid  <= 1'b0;
      qrs_end.valid <= 1'b0;
      end_timeout   <= 1'b0;

      if (!in_band)             run <= '0;
      else if (run != '1)       run <= run + 1'b1;

      if (hold)                 frozen <= 1'b1;
      else if (release_i)       frozen <= 1'b0;

      case (mode)
        MODE_ON: begin
          if (in_run && !frozen && !hold) on_cand <= loc;
          if (r_det) begin
            qrs_on.valid <= 1'b1;
            qrs_on.loc   <= on_cand;
            mode         <= MODE_END;
            frozen       <= 1'b0;
            tmr          <= '0;
          end
        end
        MODE_END: begin
          tmr <= tmr + 1'b1;
          if (in_run && wide_quiet) begin
            qrs_end.valid <= 1'b1;
            qrs_end.loc   <= loc - loc_t'(run);   // first sample of the run
            mode          <= MODE_ON;
          end else if (tmr >= END_MAX[$bits(tmr)-1:0]) begin
            qrs_end.valid <= 1'b1;
            qrs_end.loc   <= loc;
            end_timeout   <= 1'b1;
            mode          <= MODE_ON;
          end
        end
        default: mode <= MODE_ON;
      endcase
    end
  end

endmodule
