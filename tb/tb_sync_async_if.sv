// tb_sync_async_if: drives the mixed-timing interface with a model of the
// asynchronous kernel (VALID rises a random 1..30 ns after EN, garbage on its
// outputs while powered down) and checks the sequence of the thesis' figure:
// window inputs and power enable registered first, EN one clock later with all
// inputs stable, result captured by the kernel's own VALID, EN and power
// enable removed once the result is in the clock domain. Also checks this
// design's timing (result strobe 4 clocks after the request), that requests
// are ignored while busy, and that isolation hides a powered-down kernel.
`timescale 1ns/1ps
module tb_sync_async_if;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req = 0;
  search_kind_e req_kind = SEARCH_P;
  slot_t req_start = '0, req_len = '0;
  thr_t  req_thr = '0;
  logic  busy, res_valid, res_found;
  search_kind_e res_kind;
  slot_t res_offset;
  logic  k_en, k_pwr_en;
  slot_t k_start, k_len;
  thr_t  k_thr;
  logic  k_valid = 0, k_found = 0;
  slot_t k_offset = '0;

  sync_async_if dut (.*);
  always #50 clk = ~clk;       // 100 ns clock (any period longer than the kernel run)

  int checks = 0, failures = 0;
  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  // kernel model
  bit    m_found;
  slot_t m_off;
  int    en_rises = 0, bad_setup = 0, bad_hold = 0;
  slot_t s_start, s_len;
  thr_t  s_thr;
  always @(posedge k_en) begin
    en_rises++;
    if (!k_pwr_en) bad_setup++;
    s_start = k_start; s_len = k_len; s_thr = k_thr;
    #(real'($urandom_range(1, 30)));
    if (k_start != s_start || k_len != s_len || k_thr != s_thr) bad_hold++;
    k_found = m_found; k_offset = m_off; k_valid = 1;
  end
  always @(negedge k_en) begin
    k_valid = 0;
    k_found = 0;
  end
  // powered-down kernel: outputs float (modelled as 1s)
  always @(negedge k_pwr_en) begin
    #5; k_valid = 1; k_found = 1; k_offset = '1;
    #20; k_valid = 0; k_found = 0; k_offset = '0;
  end

  int n_res = 0;
  always @(posedge clk) if (rst_n && res_valid) n_res++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      int lat;
      m_found   = $urandom_range(0, 1);
      m_off     = slot_t'($urandom_range(0, 99));
      req_kind  = search_kind_e'($urandom_range(0, 1));
      req_start = slot_t'($urandom_range(0, 99));
      req_len   = slot_t'($urandom_range(1, 100));
      req_thr   = thr_t'($urandom_range(0, 4095));
      req = 1;
      @(posedge clk); #1;
      req = 0;
      check("power enable first", int'(k_pwr_en), 1);
      check("EN not yet", int'(k_en), 0);
      check("start registered", int'(k_start), int'(req_start));
      check("len registered", int'(k_len), int'(req_len));
      check("thr registered", int'(k_thr), int'(req_thr));
      // a second request while busy must be ignored
      req = 1; req_start = slot_t'(int'(req_start) ^ 1);
      @(posedge clk); #1;
      req = 0;
      check("EN one clock later", int'(k_en), 1);
      check("busy", int'(busy), 1);
      lat = 1;
      while (!res_valid && lat < 20) begin @(posedge clk); #1; lat++; end
      check("result after 4 clocks", lat, 4);
      check("found", int'(res_found), int'(m_found));
      if (m_found) check("offset", int'(res_offset), int'(m_off));
      check("kind", int'(res_kind), int'(req_kind));
      check("EN off with result", int'(k_en), 0);
      check("power off with result", int'(k_pwr_en), 0);
      while (busy) @(negedge clk);
      // the powered-down kernel's floating VALID must not clock the register
      check("isolation keeps output register", int'(dut.cap_offset), int'(m_off));
      check("isolation keeps found", int'(dut.cap_found), int'(m_found));
      repeat ($urandom_range(0, 3)) @(negedge clk);
      @(negedge clk);
    end
    check("kernel runs", en_rises, 40);
    check("results", n_res, 40);
    check("EN only with power", bad_setup, 0);
    check("inputs stable while running", bad_hold, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
