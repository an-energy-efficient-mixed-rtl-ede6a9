// mmouse_ring: behavioural model of the two-stage 2-phase handshake ring.
//
// Behavioural model (gate delays, not for synthesis): the real part is a
// handful of standard cells placed by hand-constrained flow.
//
// The ring is the thesis' modification of the MOUSETRAP pipeline closed on
// itself: a NAND of EN and the ring's last request C drives a matched delay
// line (outside this model, between nand_out and a_dly); its output A enters
// latch 1, whose enable is XNOR(B, C), and B enters latch 2, whose enable is
// XOR(B, C). Reset sets B = C = 1 (this design's choice), so latch 1 is
// transparent, latch 2 opaque and A = 1 = B: the ring is still until EN rises
// and the first iteration waits a full delay-line time. Each transition of A passes into B, which closes latch 1 (en1 falls)
// and opens latch 2 (en2 rises); C follows B, which re-opens latch 1 and
// closes latch 2, and inverts the NAND output for the next round. Every
// transition of A thus gives one low pulse on en1 and one high pulse on en2:
// en1 enables the slave latches of the datapath and en2 its master latches.
// The ring runs while EN is high and stops after EN falls; when EN falls at
// the same moment as C, one more (empty) iteration may pass. rst (held while
// the kernel is off) sets both latches. Gate delay TG is a model value.
`timescale 1ns/1ps
module mmouse_ring #(
  parameter real TG = 0.1        // gate delay in ns (model value)
) (
  input  logic en,
  input  logic rst,
  output logic nand_out,         // to the matched delay line
  input  logic a_dly,            // from the matched delay line
  output logic en1,              // slave enable (transparent high)
  output logic en2               // master enable (transparent high)
);

  logic b, c;

  assign #(TG) nand_out = ~(en & c);
  assign #(TG) en1      = ~(b ^ c);
  assign #(TG) en2      = b ^ c;

  always_latch begin
    if (rst)      b = 1'b1;
    else if (en1) b = a_dly;
  end

  always_latch begin
    if (rst)      c = 1'b1;
    else if (en2) c = b;
  end

endmodule
