// ac_pkg: types and constants shared by the time-multiplexed MIMO
// auto-correlator and the CFO estimator.
//
// A received sample is a complex number with IQ_W-bit signed real (I) and
// imaginary (Q) parts. The correlator works on the legacy 802.11 preamble:
// short training symbols of STS_LEN samples and long training symbols of
// LTS_LEN samples, received on NR antennas. The antenna count, the symbol
// lengths and the 10-bit I/Q width follow the published design; the product
// and accumulator widths are derived here so that no precision is lost
// (full bit-width correlation, as a CFO estimate needs).
package ac_pkg;

  parameter int NR      = 4;   // receive antennas
  parameter int IQ_W    = 10;  // bits of I and of Q
  parameter int STS_LEN = 16;  // short training symbol length (samples)
  parameter int LTS_LEN = 64;  // long training symbol length (samples)
  parameter int FFT_N   = 64;  // FFT size N of the CFO formula

  // x * conj(y) of two IQ_W-bit complex numbers needs 2*IQ_W+1 bits;
  // summing LTS_LEN of them adds $clog2(LTS_LEN) bits.
  parameter int PROD_W = 2 * IQ_W + 1;
  parameter int ACC_W  = PROD_W + $clog2(LTS_LEN);  // 27

  typedef struct packed {
    logic signed [IQ_W-1:0] re;
    logic signed [IQ_W-1:0] im;
  } iq_t;

  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } acc_t;

endpackage
