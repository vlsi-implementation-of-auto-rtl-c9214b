// ac_block: the single auto-correlation unit shared by all receive branches
// (conjugation, complex multiplier and accumulating adder).
//
// For each sample with `valid` high it forms rx_in * conj(drx_in):
//   re = rx.re*d.re + rx.im*d.im,   im = rx.im*d.re - rx.re*d.im
// in full precision and registers it (pipeline stage 1). Stage 2 adds the
// registered product into the accumulator; `first` starts a new sum with the
// product itself, and on `last` the finished sum is copied to acc and
// acc_valid pulses for one cycle, two clock edges after the cycle that
// carried the last sample. acc holds its value until the next result. No
// rounding or truncation is done anywhere: the widths come from ac_pkg
// (21-bit products, 27-bit sums of up to 64 products).
//
// The three parts and their sharing between branches follow the published
// architecture; the two-stage pipeline depth is this design's choice.
module ac_block
  import ac_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  iq_t  rx_in,     // Rx_in: present sample
  input  iq_t  drx_in,    // DRx_in: sample one symbol earlier
  input  logic valid,
  input  logic first,
  input  logic last,
  input  logic fine,
  output acc_t acc,       // A(n)
  output logic acc_valid,
  output logic acc_fine
);

  logic signed [PROD_W-1:0] p_re, p_im;
  logic                     v1, first1, last1, fine1;
  acc_t                     sum, sum_nxt;

  // Stage 1: conjugate-multiply.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_re   <= '0;
      p_im   <= '0;
      v1     <= 1'b0;
      first1 <= 1'b0;
      last1  <= 1'b0;
      fine1  <= 1'b0;
    end else begin
      v1     <= valid;
      first1 <= valid && first;
      last1  <= valid && last;
      fine1  <= fine;
      if (valid) begin
        p_re <= PROD_W'(rx_in.re * drx_in.re) + PROD_W'(rx_in.im * drx_in.im);
        p_im <= PROD_W'(rx_in.im * drx_in.re) - PROD_W'(rx_in.re * drx_in.im);
      end
    end
  end

  // Stage 2: accumulate.
  always_comb begin
    if (first1) begin
      sum_nxt.re = ACC_W'(p_re);
      sum_nxt.im = ACC_W'(p_im);
    end else begin
      sum_nxt.re = sum.re + ACC_W'(p_re);
      sum_nxt.im = sum.im + ACC_W'(p_im);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum       <= '0;
      acc       <= '0;
      acc_valid <= 1'b0;
      acc_fine  <= 1'b0;
    end else begin
      acc_valid <= last1;
      if (v1) sum <= sum_nxt;
      if (last1) begin
        acc      <= sum_nxt;
        acc_fine <= fine1;
      end
    end
  end

endmodule
