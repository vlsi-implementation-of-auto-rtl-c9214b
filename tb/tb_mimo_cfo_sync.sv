// tb_mimo_cfo_sync: end-to-end test of the CFO front end at its default
// size (4 antennas, 10-bit I/Q, 16-sample delays, 64-point FFT).
//
// Generated preambles with known carrier frequency offsets (from -1.8 to
// +1.8 subcarrier spacings) pass through random per-antenna gains and noise.
// For each packet the testbench checks:
//  - the coarse and fine correlation values, bit-exact against eq. (4)
//    evaluated on the same samples, 2 cycles after the 9th STS / LTS 2;
//  - the CFO estimate 16 cycles later, against N/(2*pi*L_x)*atan2 of the
//    reference correlation (a few LSBs), and against the true offset:
//    coarse within 0.03, fine (modulo 1, its unambiguous range) within 0.01.
// It also counts, from inside the design, how often each mechanism ran:
// coarse and fine estimations, a change of the antenna owning the shared AC
// block, a held (not shifting) delay register while another antenna works,
// an in_valid gap during an estimation, and a correlation in the left half
// plane (the CORDIC's pi pre-rotation). A mechanism that never ran is a
// failure. For every correlate symbol it checks that the shared AC block
// multiplies on every sample, L/4 times for each antenna.
module tb_mimo_cfo_sync;
  import ac_pkg::*;
  import tb_preamble_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0, coarse_start = 0, fine_start = 0;
  iq_t  rx [NR];
  acc_t corr;
  logic corr_valid, corr_fine, cfo_valid, cfo_fine, busy;
  logic signed [15:0] cfo_phase;
  logic signed [17:0] cfo_eps;
  int   checks = 0, failures = 0, cyc = 0;

  logic signed [ACC_W-1:0] got_re, got_im;
  assign got_re = corr.re;
  assign got_im = corr.im;

  mimo_cfo_sync dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  // ---- mechanism counters, observed inside the design ----
  int n_coarse = 0, n_fine = 0, n_switch = 0, n_hold = 0, n_gap = 0, n_left = 0;
  logic [1:0] last_sel;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ac.u_ctrl.ac_valid) begin
      if (dut.u_ac.u_ctrl.ac_first) last_sel = dut.u_ac.u_ctrl.sel;
      else if (dut.u_ac.u_ctrl.sel != last_sel) begin
        n_switch++;
        last_sel = dut.u_ac.u_ctrl.sel;
      end
    end
    if (dut.u_ac.busy && in_valid && !dut.u_ac.u_ctrl.dly_en[0]) n_hold++;
    if (dut.u_ac.busy && !in_valid) n_gap++;
    if (cfo_valid) begin
      if (cfo_fine) n_fine++; else n_coarse++;
    end
    if (corr_valid && got_re < 0) n_left++;
  end

  // ---- AC block use per correlate symbol: products of each antenna ----
  // Every sample of the 9th STS / LTS 2 must feed the shared multiplier
  // (100 % use), L/4 of them from each antenna.
  int prod [2][NR];
  int n_windows = 0;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_ac.u_ctrl.ac_valid) begin
      if (dut.u_ac.u_ctrl.ac_first)
        for (int j = 0; j < NR; j++) prod[dut.u_ac.u_ctrl.ac_fine][j] = 0;
      prod[dut.u_ac.u_ctrl.ac_fine][dut.u_ac.u_ctrl.sel]++;
      if (dut.u_ac.u_ctrl.ac_last) begin
        automatic int L = dut.u_ac.u_ctrl.ac_fine ? LTS_LEN : STS_LEN;
        n_windows++;
        for (int j = 0; j < NR; j++)
          check(prod[dut.u_ac.u_ctrl.ac_fine][j] == L / NR,
                $sformatf("antenna %0d gave %0d products in a window of %0d", j,
                          prod[dut.u_ac.u_ctrl.ac_fine][j], L));
      end
    end
  end

  // ---- expected results ----
  typedef struct { longint re, im; bit fine; int cyc; real eps; } exp_t;
  exp_t cq[$], fq[$];
  exp_t e, ec;
  int   n_corr = 0, n_cfo = 0, corr_cyc = 0;

  always @(negedge clk) if (rst_n) begin
    if (corr_valid) begin
      n_corr++;
      if (cq.size() == 0) check(0, "unexpected correlation");
      else begin
        e = cq.pop_front();
        check(longint'(got_re) == e.re && longint'(got_im) == e.im && corr_fine == e.fine
              && cyc - e.cyc == 2,
              $sformatf("corr fine=%0d %0d,%0d after %0d cycles, expected %0d,%0d",
                        corr_fine, got_re, got_im, cyc - e.cyc, e.re, e.im));
        fq.push_back(e);
        corr_cyc = cyc;
      end
    end
    if (cfo_valid) begin
      n_cfo++;
      if (fq.size() == 0) check(0, "unexpected CFO result");
      else begin
        real L, ang, est, ref_eps, d, truth;
        ec  = fq.pop_front();
        L   = ec.fine ? LTS_LEN : STS_LEN;
        est = real'(cfo_eps) / 32768.0;
        ang = $atan2(real'(ec.im), real'(ec.re));
        ref_eps = real'(FFT_N) / (2.0 * PI * L) * ang;
        d = est - ref_eps;
        // +-pi wrap of the angle moves eps by N/L.
        if (d >  real'(FFT_N) / (2.0 * L)) d -= real'(FFT_N) / L;
        if (d < -real'(FFT_N) / (2.0 * L)) d += real'(FFT_N) / L;
        check(cfo_fine == ec.fine && cyc - corr_cyc == 16, "CFO kind / latency");
        check(d < 0.001 && d > -0.001,
              $sformatf("fine=%0d eps %f, from reference correlation %f", cfo_fine, est, ref_eps));
        truth = ec.eps;
        if (ec.fine) truth = truth - $floor(truth + 0.5);   // fine sees eps modulo 1
        d = est - truth;
        if (ec.fine) d = d - $floor(d + 0.5);
        check(d < (ec.fine ? 0.01 : 0.03) && d > -(ec.fine ? 0.01 : 0.03),
              $sformatf("fine=%0d eps %f, true offset %f", cfo_fine, est, ec.eps));
      end
    end
  end

  initial begin
    Preamble p = new();
    real cfos [8] = '{0.0, 0.21, -0.37, 0.45, 1.3, -1.8, 0.72, -0.05};
    for (int j = 0; j < NR; j++) rx[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pkt = 0; pkt < 8; pkt++) begin
      longint cr, ci, fr, fi;
      p.build(cfos[pkt], 350.0, 4.0);
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
        if (n == STS8 + 2 * STS_LEN - 1) cq.push_back('{cr, ci, 1'b0, cyc, p.eps});
        if (n == LTS1 + 2 * LTS_LEN - 1) cq.push_back('{fr, fi, 1'b1, cyc, p.eps});
      end
      @(negedge clk);
      in_valid = 0; coarse_start = 0; fine_start = 0;
      repeat (30) @(negedge clk);
    end
    check(n_corr == 16 && n_cfo == 16, $sformatf("%0d correlations, %0d CFO results", n_corr, n_cfo));
    $display("mechanisms: coarse=%0d fine=%0d branch_switch=%0d delay_hold=%0d input_gap=%0d left_half_plane=%0d",
             n_coarse, n_fine, n_switch, n_hold, n_gap, n_left);
    check(n_windows == 16, $sformatf("%0d correlate windows", n_windows));
    check(n_coarse > 0, "no coarse estimation");
    check(n_fine > 0, "no fine estimation");
    check(n_switch > 0, "no branch switch");
    check(n_hold > 0, "no held delay register");
    check(n_gap > 0, "no input gap");
    check(n_left > 0, "no left-half-plane correlation");
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
