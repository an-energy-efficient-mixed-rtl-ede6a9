// delay_tuning: on-chip tuning of the kernel's matched delay line.
//
// A lead-lag detector and a small state machine pick the shortest delay-line
// setting that is still longer than the critical datapath, as in the thesis:
// the lead-lag detector is one D flip-flop whose D input is the end of the
// critical path and whose clock is the end of a copy of the delay line. The
// machine starts from the minimum code, sends a rising trigger edge into both
// paths at once and reads the flop one clock later. A 0 means the delay line
// fired first (too short): the trigger is returned low, the code goes up by
// one and the test repeats. A 1 ends the tuning with that code. If the largest
// code still reads 0 the tuning ends there with fail set (this design's
// choice, as is the retuning on every start pulse).
//
// Timing: one clock per trigger edge; a code is tested in 2 clocks, so the
// tuning takes at most 2*STEPS + 2 clocks. done and code hold until the next start.
`timescale 1ns/1ps
module delay_tuning #(
  parameter int unsigned STEPS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     trigger,     // into critical path and delay line
  input  logic                     crit_out,    // end of the critical path
  input  logic                     dly_out,     // end of the delay-line copy
  output logic [$clog2(STEPS)-1:0] code,
  output logic                     busy,
  output logic                     done,
  output logic                     fail
);

  typedef enum logic [1:0] {IDLE, FIRE, SAMPLE} st_e;
  st_e  st;
  logic lead_lag_q;

  // lead-lag detector
  always_ff @(posedge dly_out or negedge rst_n) begin
    if (!rst_n) lead_lag_q <= 1'b0;
    else        lead_lag_q <= crit_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= IDLE;
      trigger <= 1'b0;
      code    <= '0;
      done    <= 1'b0;
      fail    <= 1'b0;
    end else begin
      case (st)
        IDLE: if (start) begin
          code    <= '0;
          trigger <= 1'b0;
          done    <= 1'b0;
          fail    <= 1'b0;
          st      <= FIRE;
        end
        FIRE: begin
          trigger <= 1'b1;
          st      <= SAMPLE;
        end
        SAMPLE: begin
          trigger <= 1'b0;
          if (lead_lag_q) begin
            done <= 1'b1;
            st   <= IDLE;
          end else if (code == '1) begin
            done <= 1'b1;
            fail <= 1'b1;
            st   <= IDLE;
          end else begin
            code <= code + 1'b1;
            st   <= FIRE;
          end
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

endmodule
