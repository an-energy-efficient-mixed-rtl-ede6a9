// tb_pt_controller: runs the P/T search scheduler against a memory index that
// advances one word per clock and a model of the sync-async interface (busy
// for 4 clocks, then a result). For every beat it checks the thesis' search
// windows [R - SW_pl, R - SW_pr] for P and [R + SW_tl, R + SW_tr] for T, the
// single shared memory (P searched at QRS end, T only once R + SW_tr is
// stored), and this design's rules: window to (slot, length) mapping, clipping
// of P windows to the newest DEPTH - MARGIN words, result location = window
// start + offset, and dropping of a T search overtaken by the next beat.
`timescale 1ns/1ps
module tb_pt_controller;
  import ecg_pkg::*;

  localparam int D = MEM_DEPTH;
  localparam int BACK = D - 1 - 3;

  logic clk = 0, rst_n = 0;
  loc_t  newest = '0;
  slot_t wr_slot = '0;
  fid_t  r = '0, qrs_end = '0;
  logic [7:0] sw_pl = 8'd40, sw_tr = 8'd50;
  thr_t  thr_pt = 12'd77;
  logic  req;
  search_kind_e req_kind;
  slot_t req_start, req_len;
  thr_t  req_thr;
  logic  busy = 0, res_valid = 0, res_found = 0;
  search_kind_e res_kind = SEARCH_P;
  slot_t res_offset = '0;
  wave_t p, t;
  logic  t_dropped;

  pt_controller dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // beat schedule
  localparam int NB = 8;
  int R   [NB] = '{300, 550, 800, 1050, 1300, 1550, 1610, 1900};
  int SPL [NB] = '{40, 60, 100, 52, 100, 70, 70, 43};
  int STR [NB] = '{50, 70, 100, 64, 90, 100, 60, 55};
  int cur_b = -1;            // beat whose searches are in progress
  int exp_p_loc [NB], exp_t_loc [NB];
  bit exp_p_f [NB], exp_t_f [NB];
  int got_p [NB], got_t [NB];
  int n_drop = 0, n_req = 0;
  int beat_of_t = -1, beat_of_p = -1;

  // stimulus: newest advances each clock, R and QRS end strobes
  int now;
  always @(negedge clk) if (rst_n) begin
    newest  <= newest + 1'b1;
    wr_slot <= (wr_slot == slot_t'(D - 1)) ? '0 : wr_slot + 1'b1;
    r.valid <= 1'b0;
    qrs_end.valid <= 1'b0;
    for (int b = 0; b < NB; b++) begin
      if (int'(newest) + 1 == R[b] + 20) begin r.valid <= 1'b1; r.loc <= loc_t'(R[b]); end
      if (int'(newest) + 1 == R[b] + 35) begin
        qrs_end.valid <= 1'b1; qrs_end.loc <= loc_t'(R[b] + 35);
        sw_pl <= 8'(SPL[b]); sw_tr <= 8'(STR[b]);
      end
    end
  end

  // interface model and request checks
  int busy_cnt = 0;
  search_kind_e pend_kind;
  int pend_off, pend_found;
  always @(posedge clk) if (rst_n) begin
    // the controller decided on the previous edge, when newest was one less
    now = int'(newest) - 1;
    if (req) begin
      int left, right, first, b;
      n_req++;
      check("request while busy", busy, 0);
      check("threshold passed", int'(req_thr), 77);
      if (req_kind == SEARCH_P) begin
        b = beat_of_p;
        left = R[b] - SPL[b]; right = R[b] - SW_PR;
        check($sformatf("beat %0d P issued the clock after QRS end", b), now, R[b] + 36);
      end else begin
        b = beat_of_t;
        left = R[b] + SW_TL; right = R[b] + STR[b];
        checks++;
        if (now < right || now > right + 6) begin
          failures++; $display("FAIL beat %0d T issued at %0d, window ends %0d", b, now, right);
        end
      end
      first = (now - left > BACK) ? now - BACK : left;
      check($sformatf("beat %0d kind %0d start slot", b, req_kind), int'(req_start), first % D);
      check($sformatf("beat %0d kind %0d length", b, req_kind), int'(req_len), right - first + 1);
      pend_kind  = req_kind;
      pend_found = ($urandom_range(0, 3) != 0);
      pend_off   = $urandom_range(0, right - first);
      if (req_kind == SEARCH_P) begin exp_p_loc[b] = first + pend_off; exp_p_f[b] = pend_found; end
      else                      begin exp_t_loc[b] = first + pend_off; exp_t_f[b] = pend_found; end
      busy <= 1'b1;
      busy_cnt = 4;
    end
    res_valid <= 1'b0;
    if (busy_cnt > 0) begin
      busy_cnt--;
      if (busy_cnt == 0) begin
        busy       <= 1'b0;
        res_valid  <= 1'b1;
        res_kind   <= pend_kind;
        res_found  <= pend_found[0];
        res_offset <= slot_t'(pend_off);
      end
    end
    if (p.valid) begin
      check($sformatf("beat %0d P found", beat_of_p), int'(p.found), int'(exp_p_f[beat_of_p]));
      if (p.found) check($sformatf("beat %0d P loc", beat_of_p), int'(p.loc), exp_p_loc[beat_of_p]);
      got_p[beat_of_p]++;
    end
    if (t.valid) begin
      check($sformatf("beat %0d T found", beat_of_t), int'(t.found), int'(exp_t_f[beat_of_t]));
      if (t.found) check($sformatf("beat %0d T loc", beat_of_t), int'(t.loc), exp_t_loc[beat_of_t]);
      got_t[beat_of_t]++;
    end
    if (t_dropped) n_drop++;
    if (qrs_end.valid) begin beat_of_p = cur_b + 1; cur_b++; end
  end

  initial begin
    foreach (got_p[i]) begin got_p[i] = 0; got_t[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // T of beat b is the newest beat at the time of its request (beat 5 is
    // overtaken by beat 6 and dropped)
    fork
      forever begin
        @(posedge clk);
        beat_of_t = cur_b;
      end
    join_none
    wait (int'(newest) > 2100);
    for (int b = 0; b < NB; b++) begin
      check($sformatf("beat %0d one P result", b), got_p[b], 1);
      check($sformatf("beat %0d T results", b), got_t[b], (b == 5) ? 0 : 1);
    end
    check("dropped T searches", n_drop, 1);
    check("requests", n_req, 2 * NB - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
