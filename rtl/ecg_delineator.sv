// ecg_delineator: energy-efficient mixed synchronous/asynchronous ECG delineator.
//
// The delineator locates, beat by beat, the five ECG fiducial points P,
// QRSon, R, QRSend and T from one ECG lead sampled at 250 Hz. Everything but
// the P/T search runs on the 250 Hz sample clock, one sample per cycle:
//   dwt_qswt          four-scale wavelet transform, scales 2, 3, 4 used
//   qrs_fsm x3        peak-pair / zero-crossing candidate per scale
//   r_peak_vote       2-of-3 majority, R at the scale-2 zero crossing, refractory
//   boundary_detector QRSon pre-detection and QRSend search on scale 2
//   thr_win_engine    adaptive thresholds and P/T search windows
//   coef_memory       100 x 12-bit circular memory of scale-4 coefficients
//   pt_controller     queues the P and T searches of each beat
//   sync_async_if     mixed-timing interface, kernel enable and power enable
//   pt_search_kernel  clockless P/T search (handshake ring + latch datapath)
//   delay_tuning      lead-lag tuning of the kernel's matched delay line
// The block partition and data flow follow the thesis' architecture figure.
// The kernel's power switch is not modelled: kernel_pwr_en is its control.
//
// Locations are sample indices of ecg_in (16 bit, wrapping): sample n is the
// n-th sample after reset. The wavelet outputs describe the sample DWT_LAT
// clocks old, so every result appears later than the point it marks: R about
// 10-30 samples after the peak, P with the QRS end, T about SW_tr samples
// after R.
//
// tune_start runs the delay-line tuning (a few clocks); results are strobes.
// status (this design's choice, for monitoring): [0] candidate rejected in the
// refractory period, [1] QRS end forced by timeout, [2] T search dropped,
// [3] a search window is at its 100-sample cap, [4] tuning busy, [5] tuning
// failed (longest delay still too short), [6] lone QRS candidate cleared,
// [7] a QRS state machine is following a peak pair.
//
// Beside the delineator, and not connected to it, sits fir16_iter, the 16-tap
// FIR filter the thesis uses to evaluate its asynchronous handshake ring; its
// ports are the fir_* signals.
`timescale 1ns/1ps
module ecg_delineator
  import ecg_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned STEPS = 8
) (
  input  logic                     clk,          // 250 Hz sample clock
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] ecg_in,
  input  logic                     tune_start,
  output fid_t                     r_peak,
  output fid_t                     qrs_on,
  output fid_t                     qrs_end,
  output wave_t                    p_wave,
  output wave_t                    t_wave,
  output logic                     kernel_pwr_en,
  output logic                     tune_done,
  output logic [$clog2(STEPS)-1:0] tune_code,
  output logic [7:0]               status,       // event flags, see below
  // 16-tap iterative FIR test vehicle of the same asynchronous style (own ports)
  input  logic                     fir_en,
  input  logic signed [7:0]        fir_x [16],
  input  logic signed [7:0]        fir_h [16],
  input  logic [$clog2(STEPS)-1:0] fir_dly_code,
  output logic                     fir_valid,
  output logic signed [15:0]       fir_y
);

  // ---------------- sample index of the wavelet outputs ----------------
  loc_t loc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) loc <= loc_t'(-int'(DWT_LAT) - 1);
    else        loc <= loc + 1'b1;
  end

  // ---------------- wavelet transform ----------------
  coef_t w [3];
  dwt_qswt u_dwt (
    .clk(clk), .rst_n(rst_n), .ecg_in(ecg_in),
    .w2(w[0]), .w3(w[1]), .w4(w[2])
  );

  // ---------------- thresholds and windows ----------------
  thr_t thr_p [3], thr_n [3];
  thr_t thr_b_p, thr_b_n, thr_pt;
  logic [7:0] sw_pl, sw_tr;
  logic sw_clamped;
  fid_t r_int, on_int, end_int;

  thr_win_engine u_thr (
    .clk(clk), .rst_n(rst_n), .w(w), .upd(r_int.valid),
    .qrs_on(on_int), .qrs_end(end_int),
    .thr_p(thr_p), .thr_n(thr_n), .thr_b_p(thr_b_p), .thr_b_n(thr_b_n),
    .thr_pt(thr_pt), .sw_pl(sw_pl), .sw_tr(sw_tr), .sw_clamped(sw_clamped)
  );

  // ---------------- QRS state machines and vote ----------------
  logic [2:0] busy_s, cand;
  loc_t       zc_loc [3];

  for (genvar k = 0; k < 3; k++) begin : g_fsm
    qrs_fsm u_fsm (
      .clk(clk), .rst_n(rst_n), .coef(w[k]), .loc(loc),
      .thr_p(thr_p[k]), .thr_n(thr_n[k]),
      .busy(busy_s[k]), .cand(cand[k]), .zc_loc(zc_loc[k]),
      .pk_pos(), .pk_neg()
    );
  end

  logic vote_clear, vote_rejected;
  r_peak_vote u_vote (
    .clk(clk), .rst_n(rst_n), .cand(cand), .zc_loc(zc_loc),
    .r(r_int), .clear(vote_clear), .rejected(vote_rejected)
  );

  // ---------------- QRS boundaries ----------------
  logic end_timeout;
  boundary_detector u_bdry (
    .clk(clk), .rst_n(rst_n), .w2(w[0]), .w4(w[2]), .loc(loc),
    .thr_b_p(thr_b_p), .thr_b_n(thr_b_n), .thr4_p(thr_p[2]), .thr4_n(thr_n[2]),
    .hold(busy_s[0]), .release_i(vote_clear), .r_det(r_int.valid),
    .qrs_on(on_int), .qrs_end(end_int), .end_timeout(end_timeout)
  );

  // ---------------- scale-4 memory ----------------
  coef_t mem_q [DEPTH];
  slot_t wr_slot;
  coef_memory #(.DEPTH(DEPTH)) u_mem (
    .clk(clk), .rst_n(rst_n), .wr_data(w[2]), .mem_q(mem_q), .wr_slot(wr_slot)
  );

  // ---------------- P/T scheduling and interface ----------------
  logic         req, if_busy, res_valid, res_found, t_dropped;
  search_kind_e req_kind, res_kind;
  slot_t        req_start, req_len, res_offset;
  thr_t         req_thr;

  pt_controller #(.DEPTH(DEPTH)) u_ctl (
    .clk(clk), .rst_n(rst_n), .newest(loc - 1'b1), .wr_slot(wr_slot),
    .r(r_int), .qrs_end(end_int), .sw_pl(sw_pl), .sw_tr(sw_tr), .thr_pt(thr_pt),
    .req(req), .req_kind(req_kind), .req_start(req_start), .req_len(req_len),
    .req_thr(req_thr), .busy(if_busy), .res_valid(res_valid), .res_kind(res_kind),
    .res_found(res_found), .res_offset(res_offset),
    .p(p_wave), .t(t_wave), .t_dropped(t_dropped)
  );

  logic  k_en, k_valid, k_found;
  slot_t k_start, k_len, k_offset;
  thr_t  k_thr;

  sync_async_if u_if (
    .clk(clk), .rst_n(rst_n),
    .req(req), .req_kind(req_kind), .req_start(req_start), .req_len(req_len),
    .req_thr(req_thr), .busy(if_busy),
    .res_valid(res_valid), .res_kind(res_kind), .res_found(res_found),
    .res_offset(res_offset),
    .k_en(k_en), .k_pwr_en(kernel_pwr_en), .k_start(k_start), .k_len(k_len),
    .k_thr(k_thr), .k_valid(k_valid), .k_found(k_found), .k_offset(k_offset)
  );

  // ---------------- asynchronous kernel ----------------
  pt_search_kernel #(.DEPTH(DEPTH), .STEPS(STEPS)) u_kernel (
    .en(k_en), .start_slot(k_start), .len(k_len), .thr(k_thr), .mem(mem_q),
    .dly_code(tune_code), .valid(k_valid), .found(k_found), .offset(k_offset)
  );

  // ---------------- delay-line tuning ----------------
  logic trig, crit_out, dly_out, tune_busy, tune_fail;

  critical_path_replica u_crit (.din(trig), .dout(crit_out));

  tunable_delay_line #(.STEPS(STEPS)) u_dly_copy (
    .din(trig), .code(tune_code), .dout(dly_out)
  );

  delay_tuning #(.STEPS(STEPS)) u_tune (
    .clk(clk), .rst_n(rst_n), .start(tune_start), .trigger(trig),
    .crit_out(crit_out), .dly_out(dly_out), .code(tune_code),
    .busy(tune_busy), .done(tune_done), .fail(tune_fail)
  );

  // ---------------- FIR test vehicle (independent) ----------------
  fir16_iter #(.STEPS(STEPS)) u_fir (
    .en(fir_en), .x(fir_x), .h(fir_h), .dly_code(fir_dly_code),
    .valid(fir_valid), .y(fir_y)
  );

  assign status  = {|busy_s, vote_clear, tune_fail, tune_busy,
                    sw_clamped, t_dropped, end_timeout, vote_rejected};

  assign r_peak  = r_int;
  assign qrs_on  = on_int;
  assign qrs_end = end_int;

endmodule
