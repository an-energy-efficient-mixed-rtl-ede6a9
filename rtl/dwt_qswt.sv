// dwt_qswt: four-scale quadratic-spline stationary wavelet transform.
//
// The transform is the "algorithme a trous" filter bank: a chain of low-pass
// filters h_i whose taps are spread 2^(i-1) samples apart, and at each scale a
// high-pass g_i on the low-pass output of the scale before. The taps follow
// the thesis: h_i = 1/8 {1, 3, 3, 1} and g_i = 2 {1, -1}, with tap spacing
// d = 2^(i-1). Every product is a shift and an add, so there is no multiplier.
// Scale 1 is not used; scales 2, 3 and 4 are produced.
//
// Made causal, the filters of scale k span 3*2^(k-1)-2 samples (4, 10, 22).
// This design delays scales 2 and 3 further so that all three outputs have
// the same group delay; DWT_LAT (ecg_pkg) is that delay in whole samples,
// register stages included, so that a coefficient labelled with sample index
// L shows the zero crossing of an input peak at L at the first sample after it. The alignment delay lines, the truncating
// divide-by-8 and the saturation of the x2 high-pass to COEF_W bits are this
// design's choices; the thesis does not give word widths inside the DWT.
//
// Interface: one sample in per clock (250 Hz), three coefficients out per clock.
`timescale 1ns/1ps
module dwt_qswt
  import ecg_pkg::*;
#(
  parameter int unsigned IN_W = DATA_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] ecg_in,
  output coef_t                  w2,
  output coef_t                  w3,
  output coef_t                  w4
);

  // The filters are not centred: h_i leads by d/2 and g_i by d/2, so the
  // causal scale k has a group delay of 2.5, 6.5 and 14.5 samples for k = 2,
  // 3, 4. Scale 4 passes 3 register stages, scale 3 passes 2 plus AL3 and
  // scale 2 passes 1 plus AL2, so all three have a delay of 17.5 samples and
  // a peak of the input shows as a zero crossing between samples n-18 and n-17.
  localparam int unsigned AL2 = 14;   // 17.5 - 2.5 - 1
  localparam int unsigned AL3 = 9;    // 17.5 - 6.5 - 2

  typedef logic signed [IN_W-1:0] smp_t;
  typedef logic signed [IN_W+3:0] wide_t;

  // histories of the signal feeding each stage: x (d=1), a1 (d=2), a2 (d=4), a3 (d=8)
  smp_t xh  [4];   // x[n], x[n-1], x[n-2], x[n-3]
  smp_t a1h [7];   // a1[n] .. a1[n-6]
  smp_t a2h [13];  // a2[n] .. a2[n-12]
  smp_t a3h [9];   // a3[n] .. a3[n-8]
  coef_t d2 [AL2];
  coef_t d3 [AL3];

  // h_i: (x0 + 3*x1 + 3*x2 + x3) / 8, 3*v written as v + 2v
  function automatic smp_t lowpass(input smp_t s0, input smp_t s1, input smp_t s2, input smp_t s3);
    wide_t acc;
    acc = wide_t'(s0) + wide_t'(s1) + (wide_t'(s1) <<< 1)
        + wide_t'(s2) + (wide_t'(s2) <<< 1) + wide_t'(s3);
    return smp_t'(acc >>> 3);
  endfunction

  // g_i: 2 * (v[n] - v[n-d]), saturated to the coefficient width
  function automatic coef_t highpass(input smp_t s0, input smp_t sd);
    wide_t diff;
    diff = (wide_t'(s0) - wide_t'(sd)) <<< 1;
    return sat_coef((COEF_W+4)'(diff));
  endfunction

  smp_t  a1_n, a2_n, a3_n;
  coef_t w2_n, w3_n, w4_n;

  always_comb begin
    a1_n = lowpass(ecg_in, xh[0], xh[1], xh[2]);
    a2_n = lowpass(a1h[0], a1h[2], a1h[4], a1h[6]);
    a3_n = lowpass(a2h[0], a2h[4], a2h[8], a2h[12]);
    w2_n = highpass(a1h[0], a1h[2]);
    w3_n = highpass(a2h[0], a2h[4]);
    w4_n = highpass(a3h[0], a3h[8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xh  <= '{default: '0};
      a1h <= '{default: '0};
      a2h <= '{default: '0};
      a3h <= '{default: '0};
      d2  <= '{default: '0};
      d3  <= '{default: '0};
      w2  <= '0;
      w3  <= '0;
      w4  <= '0;
    end else begin
      xh[0] <= ecg_in;
      for (int i = 1; i < 4; i++)  xh[i]  <= xh[i-1];
      a1h[0] <= a1_n;
      for (int i = 1; i < 7; i++)  a1h[i] <= a1h[i-1];
      a2h[0] <= a2_n;
      for (int i = 1; i < 13; i++) a2h[i] <= a2h[i-1];
      a3h[0] <= a3_n;
      for (int i = 1; i < 9; i++)  a3h[i] <= a3h[i-1];
      d2[0] <= w2_n;
      for (int i = 1; i < AL2; i++) d2[i] <= d2[i-1];
      d3[0] <= w3_n;
      for (int i = 1; i < AL3; i++) d3[i] <= d3[i-1];
      w2 <= d2[AL2-1];
      w3 <= d3[AL3-1];
      w4 <= w4_n;
    end
  end

endmodule
