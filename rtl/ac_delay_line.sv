// ac_delay_line: the per-antenna "16 Delay" register of the time-multiplexed
// auto-correlator, with its output tap multiplexer.
//
// A chain of DEPTH complex registers shifts one place on every clock edge at
// which `en` is high and holds otherwise. Because the controller enables a
// branch only during that branch's own correlation window, DEPTH registers are
// enough to hold the window of the first long training symbol until the same
// window of the second one arrives 64 samples later, and COARSE_TAP registers
// do the same for the 16-sample short training symbols. `dout` is stage DEPTH
// (tap_fine = 1) or stage COARSE_TAP (tap_fine = 0), read combinationally from
// the registers: while a branch correlates, `dout` is the sample from one
// symbol earlier that pairs with the present `din`.
//
// The depth of 16 and the tap multiplexer follow the published architecture;
// which stage the coarse tap takes (the 4th) is this design's reading of it.
// All stages clear on reset.
module ac_delay_line
  import ac_pkg::*;
#(
  parameter int DEPTH      = 16,
  parameter int COARSE_TAP = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,        // shift enable (this branch's Dly_en)
  input  logic tap_fine,  // 1: stage DEPTH, 0: stage COARSE_TAP
  input  iq_t  din,       // Rx_j
  output iq_t  dout       // DRx_j
);

  iq_t sr [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = tap_fine ? sr[DEPTH-1] : sr[COARSE_TAP-1];

endmodule
