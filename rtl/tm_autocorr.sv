// tm_autocorr: time-multiplexed auto-correlator for coarse and fine CFO
// estimation on NR receive antennas.
//
// The conventional MIMO correlator gives every antenna a 64-sample delay line
// and its own multiplier, and sums all 64 products per antenna. Here each
// antenna contributes only a quarter of the window (floor(L_x/N_r) samples),
// and the quarters are staggered in time: antenna 1 owns the first quarter of
// the symbol, antenna 2 the second, and so on. Only one antenna is busy in any
// cycle, so one AC block (conjugate, multiply, accumulate) is shared through
// the Ctrl Mux, and each antenna's delay line needs only 16 registers, because
// it shifts only while its antenna owns the window:
//
//   A = sum_{j=1..NR} sum_{k in quarter j} r_j(n+k) * conj(r_j(n+k-L_x))
//
// Coarse: coarse_start with the first sample of the 8th STS; the 8th STS is
// captured (4 samples per antenna), the 9th is correlated and A (16
// products, L_x = 16) comes out 2 cycles after its last sample.
// Fine: fine_start with the first sample of LTS 1; LTS 1 is captured (16 per
// antenna) and LTS 2 correlated (64 products, L_x = 64).
// in_valid may drop between samples; everything then holds.
// The structure (16-sample delays with a tap mux, Ctrl Mux, one AC block,
// a 6-bit counter) follows the published architecture; the start pulses and
// the pipeline latency are this design's choices.
module tm_autocorr
  import ac_pkg::*;
#(
  parameter int DLY = 16   // delay registers per antenna
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  iq_t  rx [NR],      // Rx_1 .. Rx_NR
  input  logic coarse_start,
  input  logic fine_start,
  output acc_t corr,         // A(n)
  output logic corr_valid,
  output logic corr_fine,
  output logic busy
);

  logic [NR-1:0]         dly_en;
  logic                  tap_fine;
  logic [$clog2(NR)-1:0] sel;
  logic                  ac_valid, ac_first, ac_last, ac_fine;
  iq_t                   drx [NR];
  iq_t                   rx_in, drx_in;

  ac_controller #(.NR(NR)) u_ctrl (
    .clk, .rst_n, .in_valid, .coarse_start, .fine_start,
    .dly_en, .tap_fine, .sel,
    .ac_valid, .ac_first, .ac_last, .ac_fine, .busy
  );

  for (genvar j = 0; j < NR; j++) begin : g_branch
    ac_delay_line #(.DEPTH(DLY), .COARSE_TAP(DLY * STS_LEN / LTS_LEN)) u_dly (
      .clk, .rst_n,
      .en       (dly_en[j]),
      .tap_fine (tap_fine),
      .din      (rx[j]),
      .dout     (drx[j])
    );
  end

  ac_ctrl_mux #(.NR(NR)) u_mux (
    .rx, .drx, .sel, .rx_in, .drx_in
  );

  ac_block u_ac (
    .clk, .rst_n,
    .rx_in, .drx_in,
    .valid (ac_valid),
    .first (ac_first),
    .last  (ac_last),
    .fine  (ac_fine),
    .acc       (corr),
    .acc_valid (corr_valid),
    .acc_fine  (corr_fine)
  );

endmodule
