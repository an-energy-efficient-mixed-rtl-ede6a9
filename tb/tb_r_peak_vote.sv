// tb_r_peak_vote: checks the 2-of-3 majority decision of the thesis (an R peak
// needs QRS candidates on at least two of scales 2, 3, 4), the choice of the
// scale-2 zero crossing as R location (scale 3 when scale 2 did not vote),
// the refractory period after a decision, and this design's own rule that a
// lone candidate is dropped (clear) after VOTE_WIN samples.
`timescale 1ns/1ps
module tb_r_peak_vote;
  import ecg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] cand = '0;
  loc_t zc_loc [3] = '{default: '0};
  fid_t r;
  logic clear, rejected;

  r_peak_vote dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_r = 0, n_clear = 0, n_rej = 0;
  int rl [$];

  always @(posedge clk) if (rst_n) begin
    if (r.valid) begin n_r++; rl.push_back(int'(r.loc)); end
    if (clear) n_clear++;
    if (rejected) n_rej++;
  end

  task automatic pulse(input int s, input int zl);
    @(negedge clk);
    cand = 3'b000; cand[s] = 1'b1; zc_loc[s] = loc_t'(zl);
    @(negedge clk);
    cand = 3'b000;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    idle(2);
    rst_n = 1;
    // 1: scale 2 then scale 3 -> R at scale-2 crossing
    pulse(0, 100); idle(2); pulse(1, 102);
    idle(3); check("R after 2 votes", n_r, 1);
    // 2: inside the refractory period -> rejected, no R
    pulse(0, 140); pulse(1, 141);
    idle(3); check("no R in refractory", n_r, 1);
    check("rejects counted", n_rej, 2);
    idle(60);
    // 3: a single vote -> clear after VOTE_WIN, no R
    pulse(2, 300);
    idle(30); check("lone candidate cleared", n_clear, 1);
    check("no R from one vote", n_r, 1);
    // 4: scales 3 and 4 -> R at scale-3 crossing
    pulse(1, 400); pulse(2, 405);
    idle(3); check("R from scales 3 and 4", n_r, 2);
    idle(60);
    // 5: two votes further apart than VOTE_WIN -> two clears, no R
    pulse(0, 500); idle(30); pulse(2, 530); idle(30);
    check("votes too far apart", n_r, 2);
    check("clears", n_clear, 3);
    // 6: all three in the same cycle
    @(negedge clk); cand = 3'b111; zc_loc = '{600, 601, 602};
    @(negedge clk); cand = '0;
    idle(3); check("R from 3 votes", n_r, 3);
    if (rl.size() == 3) begin
      check("R loc 1", rl[0], 100);
      check("R loc 2", rl[1], 400);
      check("R loc 3", rl[2], 600);
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
