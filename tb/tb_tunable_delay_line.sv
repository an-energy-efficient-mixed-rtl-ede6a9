// tb_tunable_delay_line: measures the delay of the matched delay-line model
// for every control code, rising and falling edges, against the structure of
// the thesis (fixed section plus code tuning steps): T_FIX + code * T_STEP.
`timescale 1ns/1ps
module tb_tunable_delay_line;
  localparam int STEPS = 8;
  logic din = 0;
  logic [2:0] code = '0;
  logic dout;

  tunable_delay_line dut (.*);

  int checks = 0, failures = 0;
  realtime t0, t1;

  initial begin
    #20;
    for (int c = 0; c < STEPS; c++) begin
      code = 3'(c);
      #20;
      for (int e = 0; e < 2; e++) begin
        t0 = $realtime;
        din = ~din;
        @(dout);
        t1 = $realtime;
        checks++;
        if (t1 - t0 < 2.0 + 0.5 * c - 0.001 || t1 - t0 > 2.0 + 0.5 * c + 0.001) begin
          failures++; $display("FAIL code %0d delay %f", c, t1 - t0);
        end
        #20;
      end
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
