// tunable_delay_line: behavioural model of the matched delay line with tuning steps.
//
// Behavioural model (delays, not for synthesis): the real part is a chain of
// delay cells. As in the thesis, a fixed section is followed by a chain of
// tuning steps whose taps feed a multiplexer; the control code picks the tap,
// so the delay is T_FIX + code * T_STEP. The thesis tunes in 8 steps, hence a
// 3-bit code. The delay values are model values.
`timescale 1ns/1ps
module tunable_delay_line #(
  parameter int unsigned STEPS  = 8,
  parameter real         T_FIX  = 2.0,   // ns
  parameter real         T_STEP = 0.5    // ns
) (
  input  logic                     din,
  input  logic [$clog2(STEPS)-1:0] code,
  output logic                     dout
);

  logic tap [STEPS];

  assign #(T_FIX) tap[0] = din;
  for (genvar i = 1; i < STEPS; i++) begin : g_step
    assign #(T_STEP) tap[i] = tap[i-1];
  end

  assign dout = tap[code];

endmodule
