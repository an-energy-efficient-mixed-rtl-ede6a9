// tb_critical_path_replica: measures the delay of the critical-path model on
// rising and falling edges (T_CRIT, a model value standing for the kernel's
// real critical datapath) and checks the output copies the input level.
`timescale 1ns/1ps
module tb_critical_path_replica;
  logic din = 0, dout;

  critical_path_replica dut (.*);

  int checks = 0, failures = 0;
  realtime t0;

  initial begin
    #10;
    for (int e = 0; e < 6; e++) begin
      t0 = $realtime;
      din = ~din;
      @(dout);
      checks++;
      if ($realtime - t0 < 3.199 || $realtime - t0 > 3.201) begin
        failures++; $display("FAIL delay %f", $realtime - t0);
      end
      checks++;
      if (dout !== din) begin failures++; $display("FAIL level"); end
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
