// sync_async_if: mixed-timing interface between the 250 Hz logic and the
// asynchronous P/T search kernel.
//
// Input side: a request's window and threshold are registered on the sample
// clock together with the power enable of the kernel's domain; EN rises one
// clock later, when every input is settled.
// Because every kernel input is stable before EN, no handshake is needed on
// this side, as the thesis notes. Output side: the kernel's VALID, found and
// offset pass isolation cells (AND with the power enable, so a powered-down
// kernel reads as 0), and the rising edge of the isolated VALID clocks the
// output register that captures the result, as in the thesis' figure of the
// interface. VALID is then brought into the clock domain by a two-flop
// synchronizer; when it arrives the result is presented for one cycle and EN
// and the power enable fall, shutting the kernel down. The synchronizer and
// the request/acknowledge sequencing are this design's choices.
//
// Timing: a request is accepted when busy is low. With the kernel finishing
// within a sample period, the result strobe comes 4 clocks after the request.
`timescale 1ns/1ps
module sync_async_if
  import ecg_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // request from the search controller
  input  logic         req,
  input  search_kind_e req_kind,
  input  slot_t        req_start,
  input  slot_t        req_len,
  input  thr_t         req_thr,
  output logic         busy,
  // result to the search controller
  output logic         res_valid,
  output search_kind_e res_kind,
  output logic         res_found,
  output slot_t        res_offset,
  // to / from the kernel
  output logic         k_en,
  output logic         k_pwr_en,
  output slot_t        k_start,
  output slot_t        k_len,
  output thr_t         k_thr,
  input  logic         k_valid,
  input  logic         k_found,
  input  slot_t        k_offset
);

  typedef enum logic [1:0] {IDLE, ARM, RUN, DRAIN} st_e;
  st_e st;

  // isolation cells
  logic  valid_iso, found_iso;
  slot_t offset_iso;
  assign valid_iso  = k_valid & k_pwr_en;
  assign found_iso  = k_found & k_pwr_en;
  assign offset_iso = k_offset & {SLOT_W{k_pwr_en}};

  // output register, clocked by the kernel's VALID
  logic  cap_found;
  slot_t cap_offset;
  always_ff @(posedge valid_iso or negedge rst_n) begin
    if (!rst_n) begin
      cap_found  <= 1'b0;
      cap_offset <= '0;
    end else begin
      cap_found  <= found_iso;
      cap_offset <= offset_iso;
    end
  end

  // two-flop synchronizer of VALID into the sample clock
  logic [1:0] vsync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vsync <= '0;
    else        vsync <= {vsync[0], valid_iso};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= IDLE;
      k_en       <= 1'b0;
      k_pwr_en   <= 1'b0;
      k_start    <= '0;
      k_len      <= '0;
      k_thr      <= '0;
      res_valid  <= 1'b0;
      res_kind   <= SEARCH_P;
      res_found  <= 1'b0;
      res_offset <= '0;
    end else begin
      res_valid <= 1'b0;
      case (st)
        IDLE: if (req) begin
          k_start  <= req_start;
          k_len    <= req_len;
          k_thr    <= req_thr;
          res_kind <= req_kind;
          k_pwr_en <= 1'b1;
          st       <= ARM;
        end
        ARM: begin
          k_en <= 1'b1;
          st   <= RUN;
        end
        RUN: if (vsync[1]) begin
          res_valid  <= 1'b1;
          res_found  <= cap_found;
          res_offset <= cap_offset;
          k_en       <= 1'b0;
          k_pwr_en   <= 1'b0;
          st         <= DRAIN;
        end
        DRAIN: if (!vsync[1]) st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  assign busy = (st != IDLE);

endmodule
