// coef_memory: register-based memory of the latest scale-4 coefficients.
//
// A circular buffer of DEPTH words (100 x 12 bit in the thesis) written with
// one scale-4 coefficient per clock. The whole array is presented on mem_q:
// as in the thesis, the read decoder is not here but inside the asynchronous
// search kernel, so that it sits in the kernel's switchable power domain.
// wr_slot is the slot written by the latest clock edge, so the coefficient of
// the sample d clocks older than the newest sits at wr_slot - d (mod DEPTH).
// Reset clears the memory and the pointer (this design's choice).
`timescale 1ns/1ps
module coef_memory
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  coef_t wr_data,
  output coef_t mem_q [DEPTH],
  output slot_t wr_slot
);

  coef_t mem [DEPTH];
  slot_t wp;     // next slot to write

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem     <= '{default: '0};
      wp      <= '0;
      wr_slot <= slot_t'(DEPTH - 1);
    end else begin
      mem[wp] <= wr_data;
      wr_slot <= wp;
      wp      <= (wp == slot_t'(DEPTH - 1)) ? '0 : wp + 1'b1;
    end
  end

  assign mem_q = mem;

endmodule
