// tb_delay_tuning: runs the on-chip delay tuning of the thesis (lead-lag flop
// plus state machine stepping the delay-line code up from the minimum) with
// the delay-line model (2.0 ns + code * 0.5 ns) against five critical-path
// delays. Each must end with the smallest code whose delay line is longer than
// the critical path, within 2*(code+1)+2 clocks; a path longer than the
// longest setting must end with fail and the largest code.
`timescale 1ns/1ps
module tb_delay_tuning;
  localparam int NC = 5;
  localparam real TC [NC] = '{1.5, 2.2, 3.2, 4.9, 6.0};
  localparam int  EXP [NC] = '{0, 1, 3, 6, 7};

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic       trig [NC], crit [NC], dly [NC], busy [NC], done [NC], fail [NC];
  logic [2:0] code [NC];

  for (genvar i = 0; i < NC; i++) begin : g
    critical_path_replica #(.T_CRIT(TC[i])) u_crit (.din(trig[i]), .dout(crit[i]));
    tunable_delay_line u_dly (.din(trig[i]), .code(code[i]), .dout(dly[i]));
    delay_tuning u_tune (
      .clk, .rst_n, .start, .trigger(trig[i]), .crit_out(crit[i]), .dly_out(dly[i]),
      .code(code[i]), .busy(busy[i]), .done(done[i]), .fail(fail[i])
    );
  end

  int checks = 0, failures = 0;
  int took [NC];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin
    foreach (took[i]) took[i] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int c = 1; c < 40; c++) begin
        @(negedge clk);
        foreach (took[i]) if (took[i] < 0 && done[i]) took[i] = c;
      end
      for (int i = 0; i < NC; i++) begin
        check($sformatf("run %0d path %0d code", run, i), int'(code[i]), EXP[i]);
        check($sformatf("run %0d path %0d fail", run, i), int'(fail[i]), (i == NC - 1) ? 1 : 0);
        checks++;
        if (took[i] < 0 || took[i] > 2 * (EXP[i] + 1) + 2) begin
          failures++; $display("FAIL path %0d took %0d clocks", i, took[i]);
        end
        check($sformatf("run %0d path %0d idle", run, i), int'(busy[i]), 0);
        took[i] = -1;
      end
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
