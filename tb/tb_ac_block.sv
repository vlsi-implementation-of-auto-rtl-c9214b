// tb_ac_block: feeds windows of random length (1..64) of random full-scale
// samples, with gaps in `valid`, and checks each result against the sum of
// rx * conj(drx) computed here in plain integers. Also checks that acc_valid
// comes exactly 2 cycles after the last sample and carries the window kind.
module tb_ac_block;
  import ac_pkg::*;

  logic clk = 0, rst_n = 0, valid = 0, first = 0, last = 0, fine = 0;
  iq_t  rx_in, drx_in;
  acc_t acc;
  logic acc_valid, acc_fine;
  int   checks = 0, failures = 0, n_results = 0;
  typedef struct {
    longint re, im;
    bit     fine;
    int     cyc;
  } result_t;
  result_t expq[$];
  result_t e;
  int   cyc = 0;

  ac_block dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  logic signed [ACC_W-1:0] got_re, got_im;
  assign got_re = acc.re;
  assign got_im = acc.im;

  // Checked at the falling edge, so cycle counts are free of races.
  always @(negedge clk) begin
    if (rst_n && acc_valid) begin
      checks++;
      n_results++;
      e = expq.pop_front();
      if (longint'(got_re) != e.re || longint'(got_im) != e.im || acc_fine != e.fine
          || cyc - e.cyc != 2) begin
        failures++;
        $display("got %0d,%0d after %0d cycles, expected %0d,%0d",
                 got_re, got_im, cyc - e.cyc, e.re, e.im);
      end
    end
  end

  initial begin
    rx_in = '0; drx_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 200; w++) begin
      automatic int n = (w < 4) ? 64 : $urandom_range(1, 64);
      automatic longint sr = 0, si = 0;
      automatic bit f = $urandom_range(0, 1);
      for (int k = 0; k < n; k++) begin
        // Full-scale corner values in the first windows, random afterwards.
        @(negedge clk);
        while ($urandom_range(0, 5) == 0) begin
          valid = 0; first = 0; last = 0;
          @(negedge clk);
        end
        if (w == 0)      begin rx_in = '{-512, -512}; drx_in = '{-512, 511}; end
        else if (w == 1) begin rx_in = '{-512, -512}; drx_in = '{-512, -512}; end
        else if (w == 2) begin rx_in = '{511, -512}; drx_in = '{-512, 511}; end
        else begin
          rx_in  = iq_t'($urandom);
          drx_in = iq_t'($urandom);
        end
        valid = 1; first = (k == 0); last = (k == n - 1); fine = f;
        sr += longint'(rx_in.re) * drx_in.re + longint'(rx_in.im) * drx_in.im;
        si += longint'(rx_in.im) * drx_in.re - longint'(rx_in.re) * drx_in.im;
        if (k == n - 1) begin
          expq.push_back('{sr, si, f, cyc});
        end
      end
      @(negedge clk);
      valid = 0; first = 0; last = 0;
      // Next window may start right away.
    end
    repeat (5) @(posedge clk);
    checks++;
    if (n_results != 200) begin failures++; $display("%0d results for 200 windows", n_results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
