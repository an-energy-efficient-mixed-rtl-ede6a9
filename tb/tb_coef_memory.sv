// tb_coef_memory: writes 350 random scale-4 coefficients into the 100-entry
// circular register memory of the thesis and checks after every write that
// wr_slot names the slot just written, that the slot index wraps from 99 to 0,
// and that the whole memory holds the latest 100 samples in order.
`timescale 1ns/1ps
module tb_coef_memory;
  import ecg_pkg::*;

  localparam int D = MEM_DEPTH;

  logic clk = 0, rst_n = 0;
  coef_t wr_data = '0;
  coef_t mem_q [D];
  slot_t wr_slot;

  coef_memory dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist [$];
  int bad_mem = 0;

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (int'(wr_slot) != D - 1) begin failures++; $display("FAIL reset slot %0d", wr_slot); end
    rst_n = 1;
    for (int t = 0; t < 350; t++) begin
      wr_data = coef_t'(int'($urandom_range(0, 4095)) - 2048);
      hist.push_front(int'(wr_data));
      @(posedge clk); #1;
      checks++;
      if (int'(wr_slot) != t % D) begin failures++; $display("FAIL slot %0d at t=%0d", wr_slot, t); end
      checks++;
      if (int'(mem_q[wr_slot]) != hist[0]) begin failures++; $display("FAIL newest value at t=%0d", t); end
      bad_mem = 0;
      for (int k = 0; k < D && k < hist.size(); k++)
        if (int'(mem_q[(int'(wr_slot) - k + D) % D]) != hist[k]) bad_mem++;
      checks++;
      if (bad_mem != 0) begin failures++; $display("FAIL %0d old values wrong at t=%0d", bad_mem, t); end
      @(negedge clk);
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
