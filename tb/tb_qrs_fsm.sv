// tb_qrs_fsm: drives one scale's coefficient stream through the QRS state
// machine and checks the candidates it marks: a positive-then-negative pair,
// a negative-then-positive pair (zero-crossing location and both peak
// magnitudes), and four streams that must not give a candidate: opposite peak
// under threshold, a single peak that never turns, a pair slower than PAIR_MAX
// and a zero threshold; then 40 random triangular lobe pairs of random
// polarity, widths and heights, a quarter of them with a second lobe under
// threshold. Expected values were worked out by hand from the
// thesis rule (peak pair above threshold with a zero crossing between them).
`timescale 1ns/1ps
module tb_qrs_fsm;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0;
  coef_t coef = '0;
  loc_t  loc = '0;
  thr_t  thr_p = 12'd100, thr_n = 12'd100;
  logic  busy, cand;
  loc_t  zc_loc;
  thr_t  pk_pos, pk_neg;

  qrs_fsm dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seq [$];
  int n_cand = 0, n_busy = 0;
  int cz [$], cp [$], cn [$];

  task automatic add(input int v [], input int pad = 50);
    foreach (v[i]) seq.push_back(v[i]);
    repeat (pad) seq.push_back(0);
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  int za, zb;   // expected zero-crossing locations

  always @(posedge clk) if (rst_n) begin
    if (cand) begin n_cand++; cz.push_back(int'(zc_loc)); cp.push_back(int'(pk_pos)); cn.push_back(int'(pk_neg)); end
    if (busy) n_busy++;
  end

  initial begin
    add('{0, 50, 150, 300, 200, 50, -20, -150, -250, -120, -40, 0});     // A
    za = 6;
    add('{-200, -400, -100, 30, 180, 90, 0});                            // B
    zb = seq.size() - 50 - 7 + 3;
    add('{200, 300, 100, -50, -80, -30, 10});                            // C: small 2nd peak
    begin int v []; v = new[45]; foreach (v[i]) v[i] = 300; add(v); end  // D: never turns
    begin int v []; v = new[50];                                          // E: too slow
      foreach (v[i]) v[i] = (i == 0) ? 250 : (i < 46) ? 50 : -250; add(v); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (seq[i]) begin
      @(negedge clk);
      coef = coef_t'(seq[i]); loc = loc_t'(i);
    end
    // F: zero thresholds disable detection
    thr_p = '0; thr_n = '0;
    foreach (seq[i]) if (i < 20) begin
      @(negedge clk);
      coef = coef_t'(seq[i]); loc = loc_t'(i + 2000);
    end
    repeat (5) @(negedge clk);

    check("number of candidates", n_cand, 2);
    if (n_cand == 2) begin
      check("A zero crossing", cz[0], za);
      check("A positive peak", cp[0], 300);
      check("A negative peak", cn[0], 250);
      check("B zero crossing", cz[1], zb);
      check("B positive peak", cp[1], 180);
      check("B negative peak", cn[1], 400);
    end
    checks++; if (n_busy == 0) begin failures++; $display("FAIL busy never seen"); end

    // G: random triangular lobe pairs of either polarity. A pair whose
    // second lobe stays under threshold must give no candidate; any other
    // gives its zero crossing (first sample of the second lobe) and the two
    // lobe apexes.
    thr_p = 12'd100; thr_n = 12'd100;
    begin
      int base, nexp, k, c0;
      int ez [$], ep [$], en [$];
      base = 3000; k = 0; nexp = 0;
      cz.delete(); cp.delete(); cn.delete();
      c0 = n_cand;
      repeat (40) begin
        int w1, w2, a1, a2, h1, h2, sgn, weak2;
        w1 = 2 * ($urandom_range(1, 6)) + 1;
        w2 = 2 * ($urandom_range(1, 6)) + 1;
        a1 = $urandom_range(150, 1500);
        weak2 = ($urandom_range(0, 3) == 0);
        a2 = weak2 ? $urandom_range(20, 90) : $urandom_range(150, 1500);
        sgn = $urandom_range(0, 1) ? 1 : -1;
        h1 = (w1 + 1) / 2; h2 = (w2 + 1) / 2;
        for (int j = 1; j <= w1; j++) begin
          @(negedge clk);
          coef = coef_t'(sgn * a1 * ((j <= h1) ? j : w1 + 1 - j) / h1);
          loc = loc_t'(base + k); k++;
        end
        if (!weak2) begin
          ez.push_back(base + k);
          ep.push_back(sgn > 0 ? a1 : a2);
          en.push_back(sgn > 0 ? a2 : a1);
          nexp++;
        end
        for (int j = 1; j <= w2; j++) begin
          @(negedge clk);
          coef = coef_t'(-sgn * a2 * ((j <= h2) ? j : w2 + 1 - j) / h2);
          loc = loc_t'(base + k); k++;
        end
        repeat (50) begin
          @(negedge clk);
          coef = '0; loc = loc_t'(base + k); k++;
        end
      end
      repeat (5) @(negedge clk);
      check("random pairs: candidates", n_cand - c0, nexp);
      if (n_cand - c0 == nexp)
        foreach (ez[i]) begin
          check($sformatf("random pair %0d zero crossing", i), cz[i], ez[i]);
          check($sformatf("random pair %0d positive peak", i), cp[i], ep[i]);
          check($sformatf("random pair %0d negative peak", i), cn[i], en[i]);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
