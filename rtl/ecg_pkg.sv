// ecg_pkg: types and constants shared by the cardiac delineator.
//
// The delineator runs on one 250 Hz clock, one ECG sample per cycle. The
// 12-bit input width, the 100-entry x 12-bit coefficient memory and the P/T
// search-window constants (10, 15 and a 100-sample cap) follow the thesis.
// The 16-bit sample index and the 12-bit coefficient width are this design's
// own choices (the coefficient width is set by the 12-bit memory word).
`timescale 1ns/1ps
package ecg_pkg;

  localparam int unsigned DATA_W    = 12;   // ECG input resolution
  localparam int unsigned COEF_W    = 12;   // wavelet coefficient / memory word
  localparam int unsigned LOC_W     = 16;   // sample index (wraps)
  localparam int unsigned MEM_DEPTH = 100;  // scale-4 coefficient memory depth
  localparam int unsigned SLOT_W    = 7;    // address width for MEM_DEPTH
  localparam int unsigned THR_W     = 12;   // threshold magnitude width

  // delay of the aligned wavelet outputs behind the input sample, in samples
  localparam int unsigned DWT_LAT = 18;

  // search-window constants, in samples at 250 Hz
  localparam int unsigned SW_PR  = 10;
  localparam int unsigned SW_TL  = 15;
  localparam int unsigned SW_MAX = 100;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic        [LOC_W-1:0]  loc_t;
  typedef logic        [THR_W-1:0]  thr_t;
  typedef logic        [SLOT_W-1:0] slot_t;

  // one detected fiducial point: a one-cycle strobe and its sample index
  typedef struct packed {
    logic valid;
    loc_t loc;
  } fid_t;

  // a P or T search result: strobe, wave present, and zero-crossing index
  typedef struct packed {
    logic valid;
    logic found;
    loc_t loc;
  } wave_t;

  // the two kinds of request the shared search kernel serves
  typedef enum logic {SEARCH_P = 1'b0, SEARCH_T = 1'b1} search_kind_e;

  // saturate a wide signed value to the coefficient range
  function automatic coef_t sat_coef(input logic signed [COEF_W+3:0] v);
    localparam logic signed [COEF_W+3:0] MAXV = (1 <<< (COEF_W-1)) - 1;
    localparam logic signed [COEF_W+3:0] MINV = -(1 <<< (COEF_W-1));
    if (v > MAXV)      return coef_t'(MAXV);
    else if (v < MINV) return coef_t'(MINV);
    else               return coef_t'(v);
  endfunction

endpackage
