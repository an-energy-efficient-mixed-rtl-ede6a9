// pt_controller: schedules the shared P/T search kernel.
//
// The thesis keeps a single 100-word scale-4 memory (half of what separate P
// and T buffers would need) and lets the fast asynchronous kernel finish the P
// search before the T window is stored over it. This block does that:
//  * when a beat's QRS end is known, a P search is queued for the window
//    [R - SW_pl, R - SW_pr] and a T search for [R + SW_tl, R + SW_tr];
//  * the P search is issued at once; the T search is issued as soon as the
//    sample at R + SW_tr has been written to memory;
//  * windows are turned into (first slot, length) of the circular memory.
// A window part already overwritten is clipped: only the newest
// DEPTH - MARGIN samples are searched, MARGIN covering the words written while
// a request travels to the kernel. Clipping, the arbitration (a due T search
// goes first) and the dropping of a T search still pending when the next beat
// ends are this design's choices.
//
// Timing: one decision per clock; p / t are one-cycle result strobes with the
// absolute sample index of the zero crossing.
`timescale 1ns/1ps
module pt_controller
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH  = MEM_DEPTH,
  parameter int unsigned MARGIN = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  loc_t         newest,        // index of the newest word in memory
  input  slot_t        wr_slot,       // its slot
  input  fid_t         r,             // confirmed R peak
  input  fid_t         qrs_end,       // end of the same beat
  input  logic [7:0]   sw_pl,
  input  logic [7:0]   sw_tr,
  input  thr_t         thr_pt,
  // to / from the sync-async interface
  output logic         req,
  output search_kind_e req_kind,
  output slot_t        req_start,
  output slot_t        req_len,
  output thr_t         req_thr,
  input  logic         busy,
  input  logic         res_valid,
  input  search_kind_e res_kind,
  input  logic         res_found,
  input  slot_t        res_offset,
  // results
  output wave_t        p,
  output wave_t        t,
  output logic         t_dropped
);

  localparam int unsigned BACK_MAX = DEPTH - 1 - MARGIN;

  loc_t r_loc;
  logic p_pend, t_pend;
  loc_t p_left, p_right, t_left, t_right;
  loc_t p_base, t_base;        // absolute index of offset 0 of the issued window
  logic inflight;

  // window -> (start slot, length, first index), measured back from newest
  typedef struct packed {
    logic  ok;
    slot_t start;
    slot_t len;
    loc_t  first;
  } win_t;

  function automatic win_t map_win(input loc_t left, input loc_t right);
    win_t w;
    loc_t bl, br;
    logic [SLOT_W:0] s;
    bl = newest - left;
    br = newest - right;
    if (bl > loc_t'(BACK_MAX)) bl = loc_t'(BACK_MAX);
    w.ok    = (br <= bl);
    w.len   = slot_t'(bl - br + 1'b1);
    w.first = newest - bl;
    s = {1'b0, wr_slot} - (SLOT_W+1)'(bl);
    if (s[SLOT_W]) s = s + (SLOT_W+1)'(DEPTH);     // wrapped below 0
    w.start = s[SLOT_W-1:0];
    return w;
  endfunction

  win_t pw, tw;
  logic t_due;
  assign pw    = map_win(p_left, p_right);
  assign tw    = map_win(t_left, t_right);
  // T window fully stored: newest has reached t_right (compare within half range)
  assign t_due = t_pend && !(loc_t'(newest - t_right) >= loc_t'(1 << (LOC_W-1)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_loc     <= '0;
      p_pend    <= 1'b0;
      t_pend    <= 1'b0;
      p_left    <= '0;
      p_right   <= '0;
      t_left    <= '0;
      t_right   <= '0;
      p_base    <= '0;
      t_base    <= '0;
      inflight  <= 1'b0;
      req       <= 1'b0;
      req_kind  <= SEARCH_P;
      req_start <= '0;
      req_len   <= '0;
      req_thr   <= '0;
      p         <= '0;
      t         <= '0;
      t_dropped <= 1'b0;
    end else begin
      req       <= 1'b0;
      p.valid   <= 1'b0;
      t.valid   <= 1'b0;
      t_dropped <= 1'b0;

      if (r.valid) r_loc <= r.loc;

      // queue the searches of a finished beat
      if (qrs_end.valid) begin
        p_pend  <= 1'b1;
        p_left  <= r_loc - loc_t'(sw_pl);
        p_right <= r_loc - loc_t'(SW_PR);
        t_pend  <= 1'b1;
        t_left  <= r_loc + loc_t'(SW_TL);
        t_right <= r_loc + loc_t'(sw_tr);
        t_dropped <= t_pend;
      end

      // issue one request when the kernel is free
      if (!busy && !inflight && !req && !qrs_end.valid) begin
        if (t_due) begin
          t_pend    <= 1'b0;
          req       <= tw.ok;
          req_kind  <= SEARCH_T;
          req_start <= tw.start;
          req_len   <= tw.len;
          req_thr   <= thr_pt;
          t_base    <= tw.first;
          inflight  <= tw.ok;
          if (!tw.ok) begin t.valid <= 1'b1; t.found <= 1'b0; t.loc <= t_right; end
        end else if (p_pend) begin
          p_pend    <= 1'b0;
          req       <= pw.ok;
          req_kind  <= SEARCH_P;
          req_start <= pw.start;
          req_len   <= pw.len;
          req_thr   <= thr_pt;
          p_base    <= pw.first;
          inflight  <= pw.ok;
          if (!pw.ok) begin p.valid <= 1'b1; p.found <= 1'b0; p.loc <= p_right; end
        end
      end

      if (res_valid) begin
        inflight <= 1'b0;
        if (res_kind == SEARCH_P) begin
          p.valid <= 1'b1;
          p.found <= res_found;
          p.loc   <= p_base + loc_t'(res_offset);
        end else begin
          t.valid <= 1'b1;
          t.found <= res_found;
          t.loc   <= t_base + loc_t'(res_offset);
        end
      end
    end
  end

endmodule
