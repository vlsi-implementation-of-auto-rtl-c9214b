// tb_tm_autocorr: plays generated 4-antenna preambles into the time-
// multiplexed correlator, pulsing coarse_start on the 8th STS and fine_start
// on LTS 1, with random gaps in in_valid. Checks that exactly one coarse and
// one fine result come out per preamble, each bit-exact with the reference
// sum of eq. (4) computed from the same samples, and each 2 cycles after the
// last sample of the 9th STS / LTS 2.
module tb_tm_autocorr;
  import ac_pkg::*;
  import tb_preamble_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, coarse_start = 0, fine_start = 0;
  iq_t  rx [NR];
  acc_t corr;
  logic corr_valid, corr_fine, busy;
  int   checks = 0, failures = 0, cyc = 0;

  logic signed [ACC_W-1:0] got_re, got_im;
  assign got_re = corr.re;
  assign got_im = corr.im;

  tm_autocorr dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  typedef struct { longint re, im; bit fine; int cyc; } exp_t;
  exp_t expq[$];
  exp_t e;
  int   n_res = 0;

  always @(negedge clk) begin
    if (rst_n && corr_valid) begin
      n_res++;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result");
      end else begin
        e = expq.pop_front();
        if (longint'(got_re) != e.re || longint'(got_im) != e.im || corr_fine != e.fine
            || cyc - e.cyc != 2) begin
          failures++;
          $display("fine=%0d got %0d,%0d after %0d cycles, expected %0d,%0d",
                   corr_fine, got_re, got_im, cyc - e.cyc, e.re, e.im);
        end
      end
    end
  end

  initial begin
    Preamble p = new();
    for (int j = 0; j < NR; j++) rx[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 6; pkt++) begin
      longint cr, ci, fr, fi;
      p.build((pkt - 3) * 0.13, 350.0, 4.0);
      p.ref_corr(STS8, STS_LEN, cr, ci);
      p.ref_corr(LTS1, LTS_LEN, fr, fi);
      for (int n = 0; n < PRE_LEN; n++) begin
        @(negedge clk);
        while (pkt % 2 == 1 && $urandom_range(0, 3) == 0) begin
          in_valid = 0; coarse_start = 0; fine_start = 0;
          @(negedge clk);
        end
        in_valid     = 1;
        coarse_start = (n == STS8);
        fine_start   = (n == LTS1);
        for (int j = 0; j < NR; j++) rx[j] = p.s[j][n];
        if (n == STS8 + 2 * STS_LEN - 1) expq.push_back('{cr, ci, 1'b0, cyc});
        if (n == LTS1 + 2 * LTS_LEN - 1) expq.push_back('{fr, fi, 1'b1, cyc});
      end
      @(negedge clk);
      in_valid = 0; coarse_start = 0; fine_start = 0;
      repeat (8) @(negedge clk);
    end
    checks++;
    if (n_res != 12 || expq.size() != 0) begin
      failures++;
      $display("%0d results for 12 windows", n_res);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
