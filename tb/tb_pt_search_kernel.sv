// tb_pt_search_kernel: runs the asynchronous P/T search kernel (latch
// datapath, handshake ring and delay line together) on 400 random windows of
// a random wave-like memory and compares each result with a reference search
// written here from the thesis' description: find the global maximum and
// minimum of the scale-4 coefficients in the window; if either passes the
// threshold, the wave is the zero crossing between them (this design: the
// first word after the earlier extreme with the other sign). It also checks
// that valid only rises after en, that the kernel takes exactly one ring
// iteration per word scanned or walked (plus at most one empty iteration
// while the ring stops), and that each iteration lasts about
// one delay-line time.
`timescale 1ns/1ps
module tb_pt_search_kernel;
  import ecg_pkg::*;

  localparam int D = MEM_DEPTH;

  logic  en = 0;
  slot_t start_slot = '0, len = 7'd1;
  thr_t  thr = '0;
  coef_t mem [D];
  logic [2:0] dly_code = 3'd3;
  logic  valid, found;
  slot_t offset;

  pt_search_kernel dut (.*);

  int checks = 0, failures = 0;
  int iters = 0;
  always @(posedge dut.en2) iters++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // reference search; returns expected ring iterations
  function automatic int ref_search(input int st, input int ln, input int th,
                                    output bit f, output int off);
    int mx, mn, mxi, mni, lo, hi, v;
    bit rneg;
    mx = -2048; mn = 2047; mxi = 0; mni = 0;
    for (int k = 0; k < ln; k++) begin
      v = int'(mem[(st + k) % D]);
      if (v > mx) begin mx = v; mxi = k; end
      if (v < mn) begin mn = v; mni = k; end
    end
    f = 0; off = 0;
    if (!(mx >= th || mn <= -th)) return ln;
    lo = (mxi < mni) ? mxi : mni;
    hi = (mxi < mni) ? mni : mxi;
    rneg = (mxi < mni) ? (mx < 0) : (mn < 0);
    for (int k = lo; k <= hi; k++) begin
      v = int'(mem[(st + k) % D]);
      if (rneg ? (v >= 0) : (v < 0)) begin f = 1; off = k; return ln + (k - lo) + 1; end
    end
    return ln + (hi - lo) + 1;
  endfunction

  int n_found = 0, n_none = 0, eit_last;

  initial begin
    for (int trial = 0; trial < 400; trial++) begin
      // wave-like memory: random slow sine plus noise, sometimes small
      if (trial % 20 == 0) begin
        real amp, per, ph;
        amp = real'($urandom_range(20, 900));
        per = real'($urandom_range(15, 120));
        ph  = real'($urandom_range(0, 628)) / 100.0;
        for (int k = 0; k < D; k++)
          mem[k] = coef_t'(int'(amp * $sin(6.2832 * k / per + ph)) + int'($urandom_range(0, 20)) - 10);
        // in half of the memories, small words near the crossings are exact zeros
        if ((trial / 20) % 2 == 1)
          for (int k = 0; k < D; k++) if (mem[k] > -coef_t'(30) && mem[k] < coef_t'(30)) mem[k] = '0;
      end
      start_slot = slot_t'($urandom_range(0, D - 1));
      len        = slot_t'($urandom_range(1, D));
      thr        = thr_t'($urandom_range(0, 700));
      dly_code   = 3'($urandom_range(0, 7));
      #5;
      checks++;
      if (valid !== 1'b0) begin failures++; $display("FAIL valid high before en"); end
      iters = 0;
      begin
        bit   ef;
        int   eo, eit;
        realtime t0, dt;
        eit = ref_search(int'(start_slot), int'(len), int'(thr), ef, eo);
        t0 = $realtime;
        en = 1;
        fork
          wait (valid === 1'b1);
          #2000;
        join_any
        disable fork;
        dt = $realtime - t0;
        check($sformatf("trial %0d valid", trial), int'(valid), 1);
        check($sformatf("trial %0d found", trial), int'(found), int'(ef));
        if (ef) check($sformatf("trial %0d offset", trial), int'(offset), eo);
        checks++;
        // one iteration = delay line (2.0 + 0.5 code) + two gate delays
        if (dt > real'(eit) * (2.0 + 0.5 * dly_code + 0.25) + 1.0 ||
            dt < real'(eit) * (2.0 + 0.5 * dly_code)) begin
          failures++; $display("FAIL trial %0d run time %f for %0d iterations", trial, dt, eit);
        end
        if (ef) n_found++; else n_none++;
        eit_last = eit;
      end
      #3;
      check("result held", int'(valid), 1);
      // when the stop of the ring meets a falling C at the NAND, one more,
      // empty, iteration may pass (the datapath holds its DONE state)
      checks++;
      if (iters != eit_last && iters != eit_last + 1) begin
        failures++; $display("FAIL trial %0d iterations: got %0d expected %0d", trial, iters, eit_last);
      end
      en = 0;
      #3;
      check("valid cleared with en", int'(valid), 0);
    end
    $display("windows with a wave %0d, without %0d", n_found, n_none);
    checks++;
    if (n_found < 50 || n_none < 20) begin failures++; $display("FAIL poor coverage"); end
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
