// r_peak_vote: majority decision of the three QRS state machines.
//
// Each scale's state machine (scales 2, 3, 4) marks QRS candidates. A QRS
// complex is confirmed when two or more scales mark a candidate, and the R
// peak is then placed at the scale-2 zero crossing. After an R peak a
// refractory period follows during which no candidate can confirm a new beat.
// The thesis gives the 2-of-3 rule, the scale-2 location and the refractory
// period. Its lengths are not given: the VOTE_WIN collection window (candidates
// of one beat must arrive within it), the REFRACT length (200 ms) and the use
// of the scale-3, then scale-4, crossing when scale 2 did not vote are this
// design's choices.
//
// Timing: r_det is a one-cycle strobe on the clock after the deciding candidate.
// clear pulses when a collection window closes without a majority.
`timescale 1ns/1ps
module r_peak_vote
  import ecg_pkg::*;
#(
  parameter int unsigned VOTE_WIN = 24,   // samples, first candidate to decision
  parameter int unsigned REFRACT  = 50    // samples after a decision
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] cand,        // index 0: scale 2, 1: scale 3, 2: scale 4
  input  loc_t       zc_loc [3],
  output fid_t       r,           // confirmed R peak
  output logic       clear,       // window expired without majority
  output logic       rejected     // candidate ignored in the refractory period
);

  logic [2:0] flag;
  loc_t       lk [3];
  logic [$clog2(VOTE_WIN+1)-1:0] win;
  logic [$clog2(REFRACT+1)-1:0]  refr;

  logic [2:0] fl_n;
  loc_t       lk_n [3];
  logic [1:0] votes;
  logic       in_refr;

  assign in_refr = (refr != '0);

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      fl_n[k] = flag[k] | (cand[k] & ~in_refr);
      lk_n[k] = (cand[k] & ~flag[k]) ? zc_loc[k] : lk[k];
    end
    votes = 2'(fl_n[0]) + 2'(fl_n[1]) + 2'(fl_n[2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag     <= '0;
      lk       <= '{default: '0};
      win      <= '0;
      refr     <= '0;
      r        <= '0;
      clear    <= 1'b0;
      rejected <= 1'b0;
    end else begin
      r.valid  <= 1'b0;
      clear    <= 1'b0;
      rejected <= |cand & in_refr;
      if (in_refr) refr <= refr - 1'b1;
      if (votes >= 2) begin
        r.valid <= 1'b1;
        r.loc   <= fl_n[0] ? lk_n[0] : (fl_n[1] ? lk_n[1] : lk_n[2]);
        flag    <= '0;
        win     <= '0;
        refr    <= REFRACT[$bits(refr)-1:0];
      end else if (fl_n != '0) begin
        if (win >= VOTE_WIN[$bits(win)-1:0]) begin
          flag  <= '0;
          win   <= '0;
          clear <= 1'b1;
        end else begin
          flag <= fl_n;
          lk   <= lk_n;
          win  <= win + 1'b1;
        end
      end
    end
  end

endmodule
