// tb_thr_win_engine: checks the adaptive thresholds and the search windows.
// A directed case is checked against a value worked out by hand from the
// thesis rule thr' = (3 thr + NP + (SP - NP)/2) / 4. Then random coefficient
// streams on the three scales with random update strobes are compared every
// clock against an integer model of the six threshold lanes. The windows are
// compared against SW_pl = 10 + 0.375 QRS and SW_tr = 15 + 0.4 QRS (QRS in ms,
// 4 ms per sample, capped at 100 samples) using real arithmetic, allowing the
// one-sample truncation of the shift-add hardware, including the cap.
`timescale 1ns/1ps
module tb_thr_win_engine;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0;
  coef_t w [3] = '{default: '0};
  logic  upd = 0;
  fid_t  qrs_on = '0, qrs_end = '0;
  thr_t  thr_p [3], thr_n [3];
  thr_t  thr_b_p, thr_b_n, thr_pt;
  logic [7:0] sw_pl, sw_tr;
  logic  sw_clamped;

  thr_win_engine dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_ex [6], m_sp [6], m_np [6], m_thr [6];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int nthr(input int t, input int s, input int n);
    int a;
    a = (3 * t + n + ((s >= n) ? (s - n) / 2 : 0)) / 4;
    if (a < 16) a = 16;
    if (a > 4095) a = 4095;
    return a;
  endfunction

  // model step, same clock as the design
  task automatic model_step();
    for (int k = 0; k < 3; k++)
      for (int p = 0; p < 2; p++) begin
        int i, c, mag;
        bit on;
        i = 2 * k + p;
        c = int'(w[k]);
        on = (p == 0) ? (c > 0) : (c < 0);
        mag = (p == 0) ? c : -c;
        if (on) begin
          if (mag > m_ex[i]) m_ex[i] = mag;
        end else if (m_ex[i] != 0) begin
          if (m_ex[i] >= m_thr[i]) m_sp[i] = m_ex[i]; else m_np[i] = m_ex[i];
          m_ex[i] = 0;
        end
      end
  endtask

  initial begin
    for (int i = 0; i < 6; i++) begin m_ex[i] = 0; m_sp[i] = 200; m_np[i] = 0; m_thr[i] = 200; end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- directed: scale 2 positive excursion 600 (signal), then 50 (noise)
    begin
      int v [8] = '{300, 600, 100, -10, 30, 50, 20, -5};
      foreach (v[i]) begin
        @(negedge clk); w[0] = coef_t'(v[i]);
        @(posedge clk); model_step();
      end
      @(negedge clk); w[0] = '0; upd = 1;
      @(posedge clk);
      begin
        int t_old [6], s_old [6], n_old [6];
        t_old = m_thr; s_old = m_sp; n_old = m_np;
        model_step();
        for (int i = 0; i < 6; i++) m_thr[i] = nthr(t_old[i], s_old[i], n_old[i]);
      end
      @(negedge clk); upd = 0;
      // (3*200 + 50 + (600-50)/2) / 4 = 925 / 4 = 231
      check("directed threshold", int'(thr_p[0]), 231);
      check("boundary threshold", int'(thr_b_p), 231 >> 4);
      check("P/T threshold", int'(thr_pt), int'(thr_p[2]) >> 2);
    end

    // ---- random streams compared with the model every clock
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        int a;
        a = int'($urandom_range(0, 900));
        if ($urandom_range(0, 3) == 0) a = a / 10;
        w[k] = coef_t'(((t / (3 + k)) % 2 == 0) ? a : -a);
      end
      upd = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      begin
        int t_old [6], s_old [6], n_old [6];
        t_old = m_thr; s_old = m_sp; n_old = m_np;
        model_step();
        if (upd) for (int i = 0; i < 6; i++) m_thr[i] = nthr(t_old[i], s_old[i], n_old[i]);
      end
      #1;
      for (int k = 0; k < 3; k++) begin
        check($sformatf("thr_p[%0d] t=%0d", k, t), int'(thr_p[k]), m_thr[2*k]);
        check($sformatf("thr_n[%0d] t=%0d", k, t), int'(thr_n[k]), m_thr[2*k+1]);
      end
    end
    @(negedge clk); upd = 0;

    // ---- windows
    begin
      real avg;
      int widths [10] = '{25, 25, 30, 18, 60, 200, 200, 200, 200, 20};
      int seen_clamp;
      avg = 22.0;
      seen_clamp = 0;
      check("initial sw_pl", int'(sw_pl), 10 + 33);
      foreach (widths[b]) begin
        @(negedge clk); qrs_on.valid = 1; qrs_on.loc = loc_t'(1000 * b);
        @(negedge clk); qrs_on.valid = 0; qrs_end.valid = 1; qrs_end.loc = loc_t'(1000 * b + widths[b]);
        @(negedge clk); qrs_end.valid = 0;
        avg = real'(int'((3 * int'(avg) + widths[b]) / 4));   // integer running average
        begin
          real pl, tr;
          pl = 10.0 + 0.375 * (4.0 * avg); if (pl > 100.0) pl = 100.0;
          tr = 15.0 + 0.4   * (4.0 * avg); if (tr > 100.0) tr = 100.0;
          checks += 2;
          if (real'(sw_pl) > pl + 0.01 || real'(sw_pl) < pl - 1.0) begin
            failures++; $display("FAIL sw_pl %0d, formula %f", sw_pl, pl); end
          if (real'(sw_tr) > tr + 0.01 || real'(sw_tr) < tr - 2.0) begin
            failures++; $display("FAIL sw_tr %0d, formula %f", sw_tr, tr); end
        end
        if (sw_clamped) seen_clamp++;
      end
      checks++;
      if (seen_clamp == 0) begin failures++; $display("FAIL cap never reached"); end
      check("capped sw_pl", int'(sw_pl) <= 100, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
