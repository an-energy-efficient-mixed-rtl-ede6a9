// tb_ecg_delineator: end-to-end test of the delineator at its default sizes.
//
// A synthetic ECG is generated here: Gaussian P, Q, R, S and T waves per beat,
// a slow baseline wander and a little pseudo-random noise, at 250 Hz (4 ms
// clock). Beat 6 carries no P wave; a narrow artefact spike sits between two
// beats. The test checks against values worked out here, not in the design:
//  * every R peak found lies within 6 samples of a true R, no beat is missed
//    after the first one and there is no false R;
//  * QRSon lies 1-20 samples before and QRSend 1-30 samples after the true R;
//  * each P/T result lies inside the window rule (R - SW_pl .. R - 10 for P,
//    R + 15 .. R + SW_tr for T) and, when found, sits on a sign change of a
//    scale-4 wavelet computed here in real arithmetic (within 1 sample);
//  * every search finishes inside one sample period, and the delay tuning
//    ends with the smallest delay line longer than the critical path model;
//  * the independent FIR test vehicle in the top returns sum h[i]*x[i].
// It also counts how often each mechanism happened and fails on one that
// never did. A watchdog ends the run.
`timescale 1ns/1ps
module tb_ecg_delineator;
  import ecg_pkg::*;

  localparam time TCLK   = 4ms;
  localparam int  NBEAT  = 14;
  localparam int  NSAMP  = 200 * NBEAT + 300;
  localparam int  NOP    = 6;            // beat without P wave

  logic clk = 1'b0, rst_n = 1'b0, tune_start = 1'b0;
  logic signed [DATA_W-1:0] ecg_in;
  fid_t  r_peak, qrs_on, qrs_end;
  wave_t p_wave, t_wave;
  logic  kernel_pwr_en, tune_done;
  logic [2:0] tune_code;
  logic [7:0] status;
  logic fir_en = 1'b0, fir_valid;
  logic signed [7:0] fir_x [16], fir_h [16];
  logic [2:0] fir_dly_code = 3'd2;
  logic signed [15:0] fir_y;
  int n_fir = 0;

  ecg_delineator dut (.*);

  always #(TCLK/2) clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- synthetic ECG ----------------
  real x  [NSAMP];
  int  rtrue [NBEAT];
  int  xi [NSAMP];

  function automatic real gauss(input real t, input real s);
    return $exp(-(t*t) / (2.0*s*s));
  endfunction

  initial begin
    int seed = 12345;
    for (int b = 0; b < NBEAT; b++) rtrue[b] = 120 + 200*b + ((b % 2) ? 8 : -8);
    for (int n = 0; n < NSAMP; n++) begin
      real v, t;
      v = 40.0 * $sin(2.0 * 3.14159265 * n / 900.0);
      for (int b = 0; b < NBEAT; b++) begin
        t = n - rtrue[b];
        if (t > -60 && t < 90) begin
          if (b != NOP) v += 120.0 * gauss(t + 40.0, 4.0);
          v += -90.0  * gauss(t + 5.0, 1.5);
          v += 900.0  * gauss(t, 2.5);
          v += -220.0 * gauss(t - 5.0, 1.5);
          v += 260.0  * gauss(t - 36.0, 5.0);
        end
      end
      v += 300.0 * gauss(n - (rtrue[3] + 100), 0.6);    // artefact spike
      seed = seed * 1103515245 + 12345;
      v += ((seed >>> 16) % 7) - 3;
      x[n]  = v;
      xi[n] = int'(v);
    end
  end

  // scale-4 wavelet of the sample stream in real arithmetic (causal form),
  // w4ref(L) belongs to sample L
  real a1 [NSAMP], a2 [NSAMP], a3 [NSAMP];
  function automatic real at(ref real arr [NSAMP], input int i);
    return (i < 0 || i >= NSAMP) ? 0.0 : arr[i];
  endfunction
  initial begin
    #1;
    for (int m = 0; m < NSAMP; m++) begin
      a1[m] = (real'(xi[m]) + 3.0*(m>=1 ? xi[m-1] : 0) + 3.0*(m>=2 ? xi[m-2] : 0) + (m>=3 ? xi[m-3] : 0)) / 8.0;
    end
    for (int m = 0; m < NSAMP; m++)
      a2[m] = (at(a1,m) + 3.0*at(a1,m-2) + 3.0*at(a1,m-4) + at(a1,m-6)) / 8.0;
    for (int m = 0; m < NSAMP; m++)
      a3[m] = (at(a2,m) + 3.0*at(a2,m-4) + 3.0*at(a2,m-8) + at(a2,m-12)) / 8.0;
  end
  function automatic real w4ref(input int l);
    return 2.0 * (at(a3, l + 15) - at(a3, l + 7));
  endfunction
  function automatic bit sign_change_near(input int l);
    for (int d = -1; d <= 1; d++) begin
      real u = w4ref(l + d - 1), v = w4ref(l + d);
      if ((u > 0.0 && v <= 0.0) || (u < 0.0 && v >= 0.0) || u == 0.0) return 1'b1;
    end
    return 1'b0;
  endfunction

  // ---------------- stimulus ----------------
  int n_in = 0;
  always_ff @(posedge clk) begin
    if (rst_n) n_in <= n_in + 1;
  end
  assign ecg_in = (n_in < NSAMP) ? (DATA_W)'(xi[n_in]) : '0;

  // ---------------- result checks ----------------
  int  n_r = 0, n_on = 0, n_end = 0, n_p = 0, n_pf = 0, n_t = 0, n_tf = 0;
  int  n_pwr = 0, n_clear = 0, n_rej = 0, n_thr_upd = 0, n_p_absent = 0;
  int  last_r = -1000;
  bit  hit [NBEAT];
  int  sw_pl_seen, sw_tr_seen;

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int nearest_beat(input int l);
    int best = 0;
    for (int b = 1; b < NBEAT; b++)
      if (iabs(l - rtrue[b]) < iabs(l - rtrue[best])) best = b;
    return best;
  endfunction

  // loc is 16 bit; the run is shorter than 2^15 samples
  function automatic int uloc(input loc_t l);
    return int'(l);
  endfunction

  always @(posedge clk) begin
    int b;
    if (rst_n) begin
      if (r_peak.valid) begin
        b = nearest_beat(uloc(r_peak.loc));
        n_r++;
        check(iabs(uloc(r_peak.loc) - rtrue[b]) <= 6,
              $sformatf("R at %0d, nearest true R %0d", uloc(r_peak.loc), rtrue[b]));
        check(!hit[b], $sformatf("second R for beat %0d", b));
        hit[b]  = 1'b1;
        last_r  = uloc(r_peak.loc);
        sw_pl_seen = dut.sw_pl;
        sw_tr_seen = dut.sw_tr;
      end
      if (qrs_on.valid) begin
        b = nearest_beat(last_r);
        n_on++;
        check(uloc(qrs_on.loc) < rtrue[b] && uloc(qrs_on.loc) >= rtrue[b] - 20,
              $sformatf("QRSon %0d for R %0d", uloc(qrs_on.loc), rtrue[b]));
      end
      if (qrs_end.valid) begin
        b = nearest_beat(last_r);
        n_end++;
        check(uloc(qrs_end.loc) > rtrue[b] && uloc(qrs_end.loc) <= rtrue[b] + 30,
              $sformatf("QRSend %0d for R %0d", uloc(qrs_end.loc), rtrue[b]));
      end
      if (p_wave.valid) begin
        n_p++;
        if (p_wave.found) begin
          n_pf++;
          check(uloc(p_wave.loc) >= last_r - sw_pl_seen && uloc(p_wave.loc) <= last_r - int'(SW_PR),
                $sformatf("P %0d outside window of R %0d", uloc(p_wave.loc), last_r));
          check(sign_change_near(uloc(p_wave.loc)), $sformatf("P %0d not on a zero crossing", uloc(p_wave.loc)));
        end else if (nearest_beat(last_r) == NOP) n_p_absent++;
      end
      if (t_wave.valid) begin
        n_t++;
        if (t_wave.found) begin
          n_tf++;
          check(uloc(t_wave.loc) >= last_r + int'(SW_TL) && uloc(t_wave.loc) <= last_r + sw_tr_seen,
                $sformatf("T %0d outside window of R %0d", uloc(t_wave.loc), last_r));
          check(sign_change_near(uloc(t_wave.loc)), $sformatf("T %0d not on a zero crossing", uloc(t_wave.loc)));
        end
      end
      if (dut.u_vote.clear)    n_clear++;
      if (status[0])           n_rej++;
      if (dut.r_int.valid)     n_thr_upd++;
    end
  end

  // kernel activity: every power-up must end within the same sample period
  time t_on;
  always @(posedge dut.k_en) if (rst_n) begin
    t_on = $time;
    n_pwr++;
  end
  always @(posedge dut.k_valid) if (rst_n && n_pwr > 0) begin
    check($time - t_on < TCLK / 2, "kernel search longer than half a sample period");
  end

  // ---------------- sequence ----------------
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) tune_start = 1'b1;
    @(negedge clk) tune_start = 1'b0;
    wait (tune_done);
    // T_CRIT = 3.2 ns, delay = 2.0 + 0.5*code ns: smallest longer code is 3
    check(tune_code == 3'd3, $sformatf("tuning code %0d, expected 3", tune_code));
    // FIR test vehicle: three filter runs against a sum of products
    for (int run = 0; run < 3; run++) begin
      int sum;
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        fir_x[i] = 8'($urandom_range(0, 255));
        fir_h[i] = 8'($urandom_range(0, 255));
        sum += int'(fir_x[i]) * int'(fir_h[i]);
      end
      #10 fir_en = 1'b1;
      #500;
      check(fir_valid && fir_y == 16'(sum), $sformatf("FIR run %0d: y=%0d expected %0d", run, fir_y, 16'(sum)));
      if (fir_valid) n_fir++;
      fir_en = 1'b0;
    end
    wait (n_in >= NSAMP - 10);
    repeat (5) @(posedge clk);
    for (int b = 1; b < NBEAT - 1; b++) check(hit[b], $sformatf("beat %0d at %0d missed", b, rtrue[b]));
    $display("mechanisms: R=%0d QRSon=%0d QRSend=%0d P=%0d(found %0d, absent-beat %0d) T=%0d(found %0d) kernel_runs=%0d thr_updates=%0d vote_clear=%0d refractory_reject=%0d tune_code=%0d",
             n_r, n_on, n_end, n_p, n_pf, n_p_absent, n_t, n_tf, n_pwr, n_thr_upd, n_clear, n_rej, tune_code);
    check(n_r > 0,       "no R detection");
    check(n_on > 0,      "no QRSon");
    check(n_end > 0,     "no QRSend");
    check(n_pf > 0,      "no P wave found");
    check(n_tf > 0,      "no T wave found");
    check(n_pwr > 0,     "kernel never powered");
    check(n_thr_upd > 0, "no threshold update");
    check(n_rej > 0,     "refractory period never rejected a candidate");
    check(sw_pl_seen != 10 + 22 + 11, "search window never adapted");
    check(tune_done,     "tuning never finished");
    check(n_fir == 3,    "FIR test vehicle did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * (NSAMP + 200));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
