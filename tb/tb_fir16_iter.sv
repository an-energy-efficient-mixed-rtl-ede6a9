// tb_fir16_iter: runs the iterative asynchronous 16-tap FIR filter (MAC
// datapath, handshake ring, delay line) on 300 random sample windows and
// coefficient sets, including the extreme values -128 and 127, and compares y
// with sum h[i] * x[i] modulo 2^16. It also checks that the filter takes 16
// ring iterations (plus at most one empty one while the ring stops), that
// each lasts about one delay-line time, and that valid follows en.
`timescale 1ns/1ps
module tb_fir16_iter;
  logic en = 0;
  logic signed [7:0] x [16], h [16];
  logic [2:0] dly_code = 3'd0;
  logic valid;
  logic signed [15:0] y;

  fir16_iter dut (.*);

  int checks = 0, failures = 0;
  int iters = 0;
  always @(posedge dut.en2) iters++;

  initial begin
    #20;   // let the idle ring and delay line settle after time 0
    for (int trial = 0; trial < 300; trial++) begin
      int sum;
      realtime t0, dt;
      sum = 0;
      for (int i = 0; i < 16; i++) begin
        x[i] = 8'($urandom_range(0, 255));
        h[i] = 8'($urandom_range(0, 255));
        if (trial < 4) begin
          x[i] = (trial[0]) ? 8'sd127 : -8'sd128;
          h[i] = (trial[1]) ? 8'sd127 : -8'sd128;
        end
        sum += int'(x[i]) * int'(h[i]);
      end
      dly_code = 3'($urandom_range(0, 7));
      #5;
      checks++;
      if (valid !== 1'b0) begin failures++; $display("FAIL valid before en"); end
      iters = 0;
      t0 = $realtime;
      en = 1;
      fork
        wait (valid === 1'b1);
        #500;
      join_any
      disable fork;
      dt = $realtime - t0;
      #3;
      checks++;
      if (valid !== 1'b1) begin failures++; $display("FAIL trial %0d no valid", trial); end
      checks++;
      if (y !== 16'(sum)) begin failures++; $display("FAIL trial %0d y=%0d expected %0d", trial, y, 16'(sum)); end
      checks++;
      if (iters != 16 && iters != 17) begin failures++; $display("FAIL trial %0d %0d iterations", trial, iters); end
      checks++;
      if (dt < 16.0 * (2.0 + 0.5 * dly_code) || dt > 16.0 * (2.0 + 0.5 * dly_code + 0.25) + 1.0) begin
        failures++; $display("FAIL trial %0d run time %f", trial, dt);
      end
      en = 0;
      #3;
      checks++;
      if (valid !== 1'b0) begin failures++; $display("FAIL valid held after en"); end
    end
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
