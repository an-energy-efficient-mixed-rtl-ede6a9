// fir16_iter: iterative 16-tap FIR filter on the asynchronous handshake ring.
//
// The thesis' test vehicle for its 2-phase modified MOUSETRAP ring: one
// 8 x 8 + 16 bit multiply-accumulate (MAC) is reused for the 16 taps, one tap
// per ring iteration, with the flip-flops of a synchronous version replaced by
// slave/master latch pairs opened by the ring's en1/en2. The thesis gives no
// coefficients, so they are an input (h); the window of the last 16 input
// samples (x, x[0] newest) is also an input, held by the caller like the
// inputs of the P/T kernel. These, the 16-bit wrap-around accumulator and the
// EN/VALID interface are this design's choices.
//
//     y = sum_{i=0..15} h[i] * x[i]   (two's complement, modulo 2^16)
//
// Latches are intended here: the datapath is a latch-based bundled-data
// pipeline. Interface: inputs stable before en rises and until valid; valid
// and y are held until en falls.
`timescale 1ns/1ps
module fir16_iter #(
  parameter int unsigned TAPS  = 16,
  parameter int unsigned STEPS = 8
) (
  input  logic                     en,
  input  logic signed [7:0]        x [TAPS],
  input  logic signed [7:0]        h [TAPS],
  input  logic [$clog2(STEPS)-1:0] dly_code,
  output logic                     valid,
  output logic signed [15:0]       y
);

  typedef struct packed {
    logic                        done;
    logic [$clog2(TAPS+1)-1:0]   cnt;
    logic signed [15:0]          acc;
  } fst_t;

  fst_t m_q, s_q, nxt;
  logic en1, en2, nand_out, a_dly;

  mmouse_ring u_ring (
    .en      (en & ~m_q.done),
    .rst     (~en),
    .nand_out(nand_out),
    .a_dly   (a_dly),
    .en1     (en1),
    .en2     (en2)
  );

  tunable_delay_line #(.STEPS(STEPS)) u_dly (
    .din (nand_out),
    .code(dly_code),
    .dout(a_dly)
  );

  // MAC: 8 x 8 product plus 16-bit accumulator
  logic signed [15:0] prod;
  logic [$clog2(TAPS)-1:0] idx;
  assign idx  = m_q.cnt[$clog2(TAPS)-1:0];
  assign prod = 16'(x[idx] * h[idx]);

  always_comb begin
    nxt = m_q;
    if (!m_q.done) begin
      nxt.acc = m_q.acc + prod;
      nxt.cnt = m_q.cnt + 1'b1;
      if (m_q.cnt == ($bits(m_q.cnt))'(TAPS - 1)) nxt.done = 1'b1;
    end
  end

  // slave latch: open while en1 is high
  always_latch begin
    if (!en)      s_q = '0;
    else if (en1) s_q = nxt;
  end

  // master latch: open while en2 is high
  always_latch begin
    if (!en)      m_q = '0;
    else if (en2) m_q = s_q;
  end

  assign valid = m_q.done;
  assign y     = m_q.acc;

endmodule
