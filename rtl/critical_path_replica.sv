// critical_path_replica: behavioural model of the search kernel's critical path.
//
// Behavioural model (delay only): in silicon the lead-lag detector taps the
// real critical datapath of the design; this model stands for it with a
// fixed transport delay T_CRIT, which is a model value, so that the on-chip
// delay tuning can be exercised in simulation.
`timescale 1ns/1ps
module critical_path_replica #(
  parameter real T_CRIT = 3.2    // ns
) (
  input  logic din,
  output logic dout
);

  assign #(T_CRIT) dout = din;

endmodule
