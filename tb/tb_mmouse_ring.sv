// tb_mmouse_ring: closes the handshake ring over a 2 ns delay and checks the
// behaviour described in the thesis for the modified MOUSETRAP ring: it is
// still while reset or while EN is low, it oscillates while EN is high with
// one en1 low pulse per en2 high pulse, en1 and en2 are never high together
// (slave and master latches never both transparent), the iteration period is
// the delay line plus a few gate delays, and it stops after EN falls.
`timescale 1ns/1ps
module tb_mmouse_ring;
  logic en = 0, rst = 1;
  logic nand_out, a_dly, en1, en2;

  mmouse_ring dut (.*);
  assign #(2.0) a_dly = nand_out;

  int checks = 0, failures = 0;
  int n_en1_fall = 0, n_en2_rise = 0, overlap = 0;
  realtime last_rise = 0, max_per = 0, min_per = 1e9;

  always @(negedge en1) n_en1_fall++;
  bit meas = 0;
  always @(posedge en2) begin
    if (meas) begin
      if ($realtime - last_rise > max_per) max_per = $realtime - last_rise;
      if ($realtime - last_rise < min_per) min_per = $realtime - last_rise;
    end
    last_rise = $realtime;
    meas = en;
    n_en2_rise++;
  end

  initial begin
    forever begin
      #0.05;
      if (en1 === 1'b1 && en2 === 1'b1) overlap++;
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #0.007;
    #20;
    check("still while reset", n_en2_rise == 0);
    rst = 0;
    #20;
    check("still while EN low", n_en2_rise == 0);
    en = 1;
    #200;
    en = 0;
    #20;
    $display("iterations %0d period %f..%f ns", n_en2_rise, min_per, max_per);
    check("oscillates with EN", n_en2_rise > 40);
    check("one en1 pulse per en2 pulse", n_en1_fall == n_en2_rise);
    check("period above delay line", min_per >= 2.0);
    check("period below delay + 6 gates", max_per <= 2.6 + 0.001);
    check("en1 and en2 never both high", overlap == 0);
    begin
      int n;
      n = n_en2_rise;
      #100;
      check("stops after EN falls", n_en2_rise == n);
      en = 1;
      #50;
      check("restarts", n_en2_rise > n + 10);
      en = 0;
      #20;
      rst = 1;
      n = n_en2_rise;
      #50;
      check("still after reset", n_en2_rise == n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
