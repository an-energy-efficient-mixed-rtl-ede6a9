// pt_search_kernel: event-triggered asynchronous P/T wave search.
//
// One kernel serves both waves. Given a window of scale-4 coefficients in the
// coefficient memory (first slot, length) and a threshold, it
//  1. SCAN: steps a counter through the window, reading each word through its
//     own decoder, and keeps the global maximum and minimum and their offsets;
//  2. if either the maximum or the magnitude of the minimum reaches thr, a wave
//     exists; ZC: it steps from the earlier of the two extremes towards the
//     later one and stops at the first coefficient whose sign differs from
//     that of the earlier extreme, which is the wave's zero crossing;
//  3. DONE: raises valid with found and the offset of the crossing (found = 0
//     when no extreme reached thr, or when the two extremes have the same
//     sign so that no crossing lies between them).
// There is no clock. Every iteration is one round of the two-stage 2-phase
// handshake ring (mmouse_ring) whose matched delay is the tunable delay line:
// the next state is computed into slave latches (enabled by en1) from the
// master latches, and copied into the master latches on en2. The ring runs
// while en is high and the search is not done; en low holds the whole
// kernel in reset. The search rules, the decoder inside the kernel, the
// slave/master latch pair and the VALID output follow the thesis; the exact
// order of the zero-crossing walk is this design's reading of "find the zero
// crossing point between them".
//
// Latches are intended here (circuit warnings about them stand): the datapath
// is a latch-based bundled-data pipeline.
//
// Interface: inputs must be stable before en rises and until valid; valid,
// found and offset are held until en falls.
`timescale 1ns/1ps
module pt_search_kernel
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH  = MEM_DEPTH,
  parameter int unsigned STEPS  = 8
) (
  input  logic                     en,
  input  slot_t                    start_slot,
  input  slot_t                    len,          // 1 .. DEPTH
  input  thr_t                     thr,
  input  coef_t                    mem [DEPTH],
  input  logic [$clog2(STEPS)-1:0] dly_code,
  output logic                     valid,
  output logic                     found,
  output slot_t                    offset
);

  typedef enum logic [1:0] {SCAN, ZC, DONE} phase_e;

  typedef struct packed {
    phase_e phase;
    slot_t  cnt;
    slot_t  hi;
    coef_t  maxv;
    slot_t  maxi;
    coef_t  minv;
    slot_t  mini;
    logic   ref_neg;
    logic   found;
    slot_t  off;
  } kst_t;

  kst_t m_q, s_q, nxt;
  logic en1, en2, nand_out, a_dly;

  // ---------------- handshake ----------------
  mmouse_ring u_ring (
    .en      (en & (m_q.phase != DONE)),
    .rst     (~en),
    .nand_out(nand_out),
    .a_dly   (a_dly),
    .en1     (en1),
    .en2     (en2)
  );

  tunable_delay_line #(.STEPS(STEPS)) u_dly (
    .din (nand_out),
    .code(dly_code),
    .dout(a_dly)
  );

  // ---------------- datapath ----------------
  // decoder: window offset -> memory slot -> word
  function automatic coef_t rd(input slot_t off);
    logic [SLOT_W:0] s;
    s = {1'b0, start_slot} + {1'b0, off};
    if (s >= (SLOT_W+1)'(DEPTH)) s = s - (SLOT_W+1)'(DEPTH);
    return mem[s[SLOT_W-1:0]];
  endfunction

  coef_t cur;
  logic  crossed;   // cur lies on the other side of zero from the earlier extreme
  assign cur     = rd(m_q.cnt);
  assign crossed = m_q.ref_neg ? (cur >= 0) : (cur < 0);

  always_comb begin
    nxt = m_q;
    case (m_q.phase)
      SCAN: begin
        if (cur > m_q.maxv) begin nxt.maxv = cur; nxt.maxi = m_q.cnt; end
        if (cur < m_q.minv) begin nxt.minv = cur; nxt.mini = m_q.cnt; end
        nxt.cnt = m_q.cnt + 1'b1;
        if (m_q.cnt + 1'b1 >= len) begin
          // window scanned: the extremes in nxt now cover every word
          if (($signed({nxt.maxv[COEF_W-1], nxt.maxv}) >=  $signed({1'b0, thr})) ||
              ($signed({nxt.minv[COEF_W-1], nxt.minv}) <= -$signed({1'b0, thr}))) begin
            nxt.phase = ZC;
            nxt.cnt   = (nxt.maxi < nxt.mini) ? nxt.maxi : nxt.mini;
            nxt.hi    = (nxt.maxi < nxt.mini) ? nxt.mini : nxt.maxi;
            // sign of the earlier extreme: the crossing is the first word after
            // it with the other sign
            nxt.ref_neg = (nxt.maxi < nxt.mini) ? nxt.maxv[COEF_W-1] : nxt.minv[COEF_W-1];
          end else begin
            nxt.phase = DONE;
            nxt.found = 1'b0;
          end
        end
      end
      ZC: begin
        if (crossed) begin
          nxt.phase = DONE; nxt.found = 1'b1; nxt.off = m_q.cnt;
        end else if (m_q.cnt >= m_q.hi) begin
          nxt.phase = DONE; nxt.found = 1'b0;
        end else begin
          nxt.cnt = m_q.cnt + 1'b1;
        end
      end
      default: nxt = m_q;
    endcase
  end

  localparam kst_t KST_RESET = '{
    phase: SCAN, cnt: '0, hi: '0,
    maxv: coef_t'(-(1 <<< (COEF_W-1))), maxi: '0,
    minv: coef_t'((1 <<< (COEF_W-1)) - 1), mini: '0,
    ref_neg: 1'b0, found: 1'b0, off: '0
  };

  // slave latch: open while en1 is high
  always_latch begin
    if (!en)      s_q = KST_RESET;
    else if (en1) s_q = nxt;
  end

  // master latch: open while en2 is high
  always_latch begin
    if (!en)      m_q = KST_RESET;
    else if (en2) m_q = s_q;
  end

  assign valid  = (m_q.phase == DONE);
  assign found  = m_q.found;
  assign offset = m_q.off;

endmodule
