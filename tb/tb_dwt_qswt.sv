// tb_dwt_qswt: checks the four-scale wavelet transform against an integer
// model written here from the filter definitions h_i = 1/8 {1,3,3,1} and
// g_i = 2 {1,-1} with taps 2^(i-1) apart (floor division, saturation to 12 bit),
// on random samples, steps and a large pulse. It also checks the alignment:
// a symmetric bump centred on sample P must change the sign of all three
// scales at the output labelled P (DWT_LAT = 18 clocks after P enters).
`timescale 1ns/1ps
module tb_dwt_qswt;
  import ecg_pkg::*;

  localparam int N = 600;
  localparam int PB = 400;     // centre of the alignment bump

  logic clk = 0, rst_n = 0;
  logic signed [DATA_W-1:0] ecg_in = '0;
  coef_t w2, w3, w4;

  dwt_qswt dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int x [N];
  int a1 [N], a2 [N], a3 [N];

  function automatic int g(ref int arr [N], input int i);
    return (i < 0) ? 0 : arr[i];
  endfunction
  function automatic int flo8(input int v);
    return (v >= 0) ? v / 8 : -((-v + 7) / 8);
  endfunction
  function automatic int sat(input int v);
    return (v > 2047) ? 2047 : (v < -2048) ? -2048 : v;
  endfunction
  function automatic int W2(input int m); return sat(2 * (g(a1, m) - g(a1, m-2))); endfunction
  function automatic int W3(input int m); return sat(2 * (g(a2, m) - g(a2, m-4))); endfunction
  function automatic int W4(input int m); return sat(2 * (g(a3, m) - g(a3, m-8))); endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      if (k < 150)        x[k] = int'($urandom_range(0, 4095)) - 2048;
      else if (k < 250)   x[k] = (k < 200) ? 1500 : -1800;
      else if (k < 300)   x[k] = (k == 270) ? 2047 : 0;
      else                x[k] = int'(1000.0 * $exp(-((k - PB) * (k - PB)) / 18.0));
    end
    for (int m = 0; m < N; m++) a1[m] = flo8(g(x,m) + 3*g(x,m-1) + 3*g(x,m-2) + g(x,m-3));
    for (int m = 0; m < N; m++) a2[m] = flo8(g(a1,m) + 3*g(a1,m-2) + 3*g(a1,m-4) + g(a1,m-6));
    for (int m = 0; m < N; m++) a3[m] = flo8(g(a2,m) + 3*g(a2,m-4) + 3*g(a2,m-8) + g(a2,m-12));
  end

  int k = 0;
  int zc [3] = '{-1, -1, -1};
  coef_t pw [3];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (k = 0; k < N; k++) begin
      ecg_in = (DATA_W)'(x[k]);
      @(posedge clk); #1;
      // outputs after edge k
      checks += 3;
      if (w2 !== coef_t'(W2(k-15))) begin failures++; $display("FAIL w2 k=%0d got %0d exp %0d", k, w2, W2(k-15)); end
      if (w3 !== coef_t'(W3(k-11))) begin failures++; $display("FAIL w3 k=%0d got %0d exp %0d", k, w3, W3(k-11)); end
      if (w4 !== coef_t'(W4(k-3)))  begin failures++; $display("FAIL w4 k=%0d got %0d exp %0d", k, w4, W4(k-3)); end
      if (k > PB) begin
        coef_t cw [3];
        cw = '{w2, w3, w4};
        for (int s = 0; s < 3; s++)
          if (zc[s] < 0 && pw[s] > 0 && cw[s] <= 0) zc[s] = k - int'(DWT_LAT);
      end
      pw = '{w2, w3, w4};
    end
    for (int s = 0; s < 3; s++) begin
      checks++;
      if (zc[s] < PB || zc[s] > PB + 1) begin
        failures++; $display("FAIL scale %0d crossing labelled %0d, bump at %0d", s + 2, zc[s], PB);
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
