// tb_boundary_detector: checks QRS onset and end detection. The thesis marks
// the boundaries where scale-2 coefficients fall inside a band set by the
// boundary threshold; this design's own rules checked here are: a run of
// RUN_LEN in-band samples, onset = last run sample before the QRS (frozen
// while the scale-2 QRS machine is busy), end = first sample of the first run
// after R while scale 4 is also quiet, and a forced end after END_MAX samples.
`timescale 1ns/1ps
module tb_boundary_detector;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0;
  coef_t w2 = '0, w4 = '0;
  loc_t  loc = '0;
  thr_t  thr_b_p = 12'd20, thr_b_n = 12'd20, thr4_p = 12'd100, thr4_n = 12'd100;
  logic  hold = 0, release_i = 0, r_det = 0;
  fid_t  qrs_on, qrs_end;
  logic  end_timeout;

  boundary_detector dut (.*);
  always #5 clk = ~clk;

  localparam int N = 400;
  int sw2 [N], sw4 [N];
  bit shold [N], srel [N], srdet [N];
  int checks = 0, failures = 0;
  int on_l [$], end_l [$], n_to = 0;

  always @(posedge clk) if (rst_n) begin
    if (qrs_on.valid)  on_l.push_back(int'(qrs_on.loc));
    if (qrs_end.valid) end_l.push_back(int'(qrs_end.loc));
    if (end_timeout)   n_to++;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    foreach (sw2[i]) begin sw2[i] = 0; sw4[i] = 0; shold[i] = 0; srel[i] = 0; srdet[i] = 0; end
    // beat 1: flat, small step at 20, QRS 21..30, R decided at 31, flat after
    sw2[20] = 10;
    begin int q [10] = '{50, 200, 400, 200, -100, -300, -200, -80, -30, -25};
      for (int i = 0; i < 10; i++) begin sw2[21+i] = q[i]; shold[21+i] = 1; end end
    srdet[31] = 1;
    // a QRS-like pulse that is dropped (release) at 60..64, then flat
    for (int i = 60; i < 65; i++) begin sw2[i] = 300; shold[i] = 1; end
    srel[65] = 1;
    // beat 2: QRS 110..119, R at 120, scale 2 quiet from 121 but scale 4 wide to 140
    for (int i = 110; i < 120; i++) begin sw2[i] = (i < 115) ? 500 : -500; shold[i] = 1; end
    srdet[120] = 1;
    for (int i = 110; i < 141; i++) sw4[i] = 150;
    for (int i = 120; i < 131; i++) sw2[i] = -100;
    // beat 3: QRS from 200, R at 210, scale 2 never quiet -> timeout
    for (int i = 200; i < 300; i++) sw2[i] = (i % 2) ? 300 : -300;
    for (int i = 200; i < 210; i++) shold[i] = 1;
    srdet[210] = 1;

    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      w2 = coef_t'(sw2[i]); w4 = coef_t'(sw4[i]); loc = loc_t'(i);
      hold = shold[i]; release_i = srel[i]; r_det = srdet[i];
    end
    repeat (3) @(negedge clk);

    check("onsets", on_l.size(), 3);
    check("ends", end_l.size(), 3);
    check("timeouts", n_to, 1);
    if (on_l.size() == 3 && end_l.size() == 3) begin
      check("beat 1 onset", on_l[0], 20);
      check("beat 1 end", end_l[0], 31);
      check("beat 2 onset (after release)", on_l[1], 109);
      check("beat 2 end waits for scale 4", end_l[1], 131);
      check("beat 3 onset", on_l[2], 199);
      check("beat 3 forced end", end_l[2], 210 + 51);
    end
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
