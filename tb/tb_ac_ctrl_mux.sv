// tb_ac_ctrl_mux: drives random samples on all branches and every select
// value, and checks that both outputs come from the selected branch.
module tb_ac_ctrl_mux;
  import ac_pkg::*;

  iq_t        rx [NR], drx [NR];
  iq_t        rx_in, drx_in;
  logic [1:0] sel;
  int         checks = 0, failures = 0;

  ac_ctrl_mux dut (.*);

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int j = 0; j < NR; j++) begin
        rx[j]  = iq_t'($urandom);
        drx[j] = iq_t'($urandom);
      end
      sel = 2'($urandom);
      #1;
      checks++;
      if (rx_in !== rx[sel] || drx_in !== drx[sel]) begin
        failures++;
        if (failures < 10) $display("sel %0d: got %h/%h", sel, rx_in, drx_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
