// tb_cfo_estimator: sends vectors of random angle and magnitude (including
// the axes and all four quadrants) and checks the CORDIC angle against
// atan2 computed in floating point, within a few LSBs, and the normalized CFO
// against N/(2*pi*L_x)*angle for both coarse (L_x=16) and fine (L_x=64)
// values. Also checks the latency of ITER+1 = 16 cycles from in_valid to
// out_valid.
module tb_cfo_estimator;
  import ac_pkg::*;

  localparam real PI    = 3.14159265358979;
  localparam int  LAT   = 16;
  localparam int  TOL   = 8;     // angle tolerance, LSB of pi/2^15

  logic clk = 0, rst_n = 0, in_valid = 0, in_fine = 0;
  logic signed [ACC_W-1:0] in_re, in_im;
  logic out_valid, out_fine, busy;
  logic signed [15:0] phase;
  logic signed [17:0] eps;
  int checks = 0, failures = 0, max_err = 0;

  cfo_estimator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%s", what);
    end
  endtask

  task automatic one(input real ang, input real mag, input bit fine);
    real  re_r = mag * $cos(ang), im_r = mag * $sin(ang);
    real  ref_ph, ref_eps, d_eps;
    int   err, lat = 0;
    @(negedge clk);
    in_re    = ACC_W'($rtoi(re_r));
    in_im    = ACC_W'($rtoi(im_r));
    in_fine  = fine;
    in_valid = 1;
    ref_ph   = $atan2(real'(in_im), real'(in_re)) / PI * 32768.0;
    @(negedge clk);
    in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    check(lat == LAT, $sformatf("latency %0d", lat));
    // +pi and -pi are the same angle: take the reference on the DUT's side.
    if (ref_ph - real'(phase) > 32768.0) ref_ph -= 65536.0;
    if (real'(phase) - ref_ph > 32768.0) ref_ph += 65536.0;
    ref_eps  = ref_ph / 32768.0 * real'(FFT_N) / (2.0 * (fine ? LTS_LEN : STS_LEN));
    err = int'(phase) - $rtoi(ref_ph);
    if (err > 32768) err -= 65536;
    if (err < -32768) err += 65536;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    check(err <= TOL, $sformatf("angle %f mag %f: phase %0d expected %f", ang, mag, phase, ref_ph));
    check(out_fine == fine, "out_fine");
    // eps with 15 fraction bits; allow the angle tolerance scaled by N/(2 L_x).
    d_eps = real'(eps) - ref_eps * 32768.0;
    if (d_eps < 0.0) d_eps = -d_eps;
    check(d_eps <= 2.0 * TOL + 1.0,
          $sformatf("eps %0d expected %f", eps, ref_eps * 32768.0));
  endtask

  initial begin
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < 8; q++) one(q * PI / 4.0, 1.0e6, q[0]);
    one(PI * 0.999, 3.0e7, 1);
    one(-PI * 0.999, 3.0e7, 0);
    for (int t = 0; t < 400; t++)
      one(($urandom_range(0, 100000) / 100000.0 - 0.5) * 2.0 * PI,
          $pow(2.0, 12.0 + $urandom_range(0, 1300) / 100.0), $urandom_range(0, 1));
    $display("largest angle error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
