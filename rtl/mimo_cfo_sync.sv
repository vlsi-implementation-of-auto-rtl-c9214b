// mimo_cfo_sync: CFO estimation front end for a 4-antenna MIMO-OFDM WLAN
// receiver working on the legacy (802.11a-style) preamble.
//
// The time-multiplexed auto-correlator (tm_autocorr) produces a coarse
// correlation value from the 8th/9th short training symbols and a fine one
// from the two long training symbols; each value goes straight into the CORDIC
// CFO estimator, which reports its angle and the normalized offset
// eps = N/(2*pi*L_x) * angle(A). The symbol timing that places coarse_start
// and fine_start comes from a timing-synchronization block outside this
// module.
//
// Timing: corr_valid pulses 2 cycles after the last sample of the 9th STS or
// of LTS 2; cfo_valid follows 16 cycles later (15 CORDIC rotations). Samples
// arrive one per in_valid; at a 20 MS/s sample rate the clock may be any
// frequency at or above it.
module mimo_cfo_sync
  import ac_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  iq_t                      rx [NR],
  input  logic                     coarse_start,
  input  logic                     fine_start,
  output acc_t                     corr,
  output logic                     corr_valid,
  output logic                     corr_fine,
  output logic                     cfo_valid,
  output logic                     cfo_fine,
  output logic signed [15:0]       cfo_phase,
  output logic signed [17:0]       cfo_eps,
  output logic                     busy
);

  logic ac_busy, est_busy;

  tm_autocorr u_ac (
    .clk, .rst_n, .in_valid, .rx, .coarse_start, .fine_start,
    .corr, .corr_valid, .corr_fine, .busy (ac_busy)
  );

  cfo_estimator u_est (
    .clk, .rst_n,
    .in_valid  (corr_valid),
    .in_fine   (corr_fine),
    .in_re     (corr.re),
    .in_im     (corr.im),
    .out_valid (cfo_valid),
    .out_fine  (cfo_fine),
    .phase     (cfo_phase),
    .eps       (cfo_eps),
    .busy      (est_busy)
  );

  assign busy = ac_busy || est_busy;

endmodule
