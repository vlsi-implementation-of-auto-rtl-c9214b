// tb_ac_controller: runs coarse and fine estimations through the controller,
// with random gaps in in_valid, and checks every control output per sample
// against the schedule worked out from the sample index: capture symbol then
// correlate symbol, branch j owning samples [j*L/4, (j+1)*L/4) of each symbol
// (L = 16 coarse, 64 fine). Also checks that the last product comes after
// exactly 2*L samples, that the controller goes idle afterwards, and that a
// fine_start in the middle of a coarse run restarts it.
module tb_ac_controller;
  import ac_pkg::*;

  logic       clk = 0, rst_n = 0, in_valid = 0, coarse_start = 0, fine_start = 0;
  logic [3:0] dly_en;
  logic       tap_fine, ac_valid, ac_first, ac_last, ac_fine, busy;
  logic [1:0] sel;
  int         checks = 0, failures = 0;

  ac_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("%t: %s", $time, what);
    end
  endtask

  // Drive n_samples valid samples of one estimation; abort_at < n stops early.
  task automatic run(input bit fine, input int n_samples);
    int L = fine ? LTS_LEN : STS_LEN;
    int s = 0;
    int last_seen = -1;
    while (s < n_samples) begin
      @(negedge clk);
      in_valid     = ($urandom_range(0, 4) != 0);
      fine_start   = in_valid && fine && (s == 0);
      coarse_start = in_valid && !fine && (s == 0);
      #1;
      if (in_valid) begin
        int sym = s / L, pos = s % L, br = pos / (L / NR);
        check(dly_en == 4'(1 << br), $sformatf("dly_en %b at sample %0d", dly_en, s));
        check(sel == 2'(br), "sel");
        check(tap_fine == fine && ac_fine == fine, "tap_fine / ac_fine");
        check(ac_valid == (sym == 1), $sformatf("ac_valid at sample %0d", s));
        check(ac_first == (sym == 1 && pos == 0), "ac_first");
        check(ac_last == (sym == 1 && pos == L - 1), "ac_last");
        if (ac_last) last_seen = s + 1;
        s++;
      end else begin
        check(dly_en == '0 && !ac_valid, "idle outputs while in_valid is low");
      end
    end
    @(negedge clk);
    in_valid = 0; fine_start = 0; coarse_start = 0;
    if (n_samples == 2 * L) begin
      check(last_seen == 2 * L, $sformatf("window ended after %0d samples", last_seen));
      #1 check(!busy, "busy after the window");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) begin
      run(0, 2 * STS_LEN);
      repeat (5) @(posedge clk);
      run(1, 2 * LTS_LEN);
      repeat (5) @(posedge clk);
    end
    // A fine start interrupts a coarse run half way.
    run(0, 20);
    run(1, 2 * LTS_LEN);
    // Idle: no enables with samples flowing.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); in_valid = 1; #1;
      check(dly_en == '0 && !ac_valid && !busy, "idle with samples");
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
