// tb_ac_delay_line: checks the gated delay register against a history model.
//
// Random samples and random shift enables drive the block; the testbench keeps
// its own list of every sample shifted in and checks, each cycle, that the
// output equals the sample shifted in DEPTH (fine tap) or COARSE_TAP (coarse
// tap) enables ago, with zeros before that many shifts have happened.
module tb_ac_delay_line;
  import ac_pkg::*;

  localparam int DEPTH = 16;   // the module defaults
  localparam int TAP   = 4;

  logic clk = 0, rst_n = 0, en = 0, tap_fine = 0;
  iq_t  din, dout;
  int   checks = 0, failures = 0;
  iq_t  hist[$];   // every sample shifted in, newest last

  ac_delay_line dut (.*);

  always #5 clk = ~clk;

  function automatic iq_t expected(input bit fine);
    int d = fine ? DEPTH : TAP;
    if (hist.size() < d) return '0;
    return hist[hist.size() - d];
  endfunction

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      en       = ($urandom_range(0, 3) != 0);
      tap_fine = (c / 200) % 2 == 1;
      din.re   = IQ_W'($urandom);
      din.im   = IQ_W'($urandom);
      #1;
      checks++;
      if (dout !== expected(tap_fine)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dout %h expected %h", c, dout, expected(tap_fine));
      end
      @(posedge clk);
      if (en) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
