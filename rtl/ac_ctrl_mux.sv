// ac_ctrl_mux: the "Ctrl Mux" that hands the shared AC block the present and
// the delayed sample of one receive branch.
//
// `sel` is the branch index from the controller (counter bits [3:2] during
// coarse and [5:4] during fine estimation). The selection is combinational;
// the AC block registers the product of what it passes. The mux itself is
// named in the published architecture; its insides are the obvious ones.
module ac_ctrl_mux
#(
  parameter int NR = ac_pkg::NR
) (
  input  ac_pkg::iq_t                     rx  [NR],  // Rx_1 .. Rx_NR
  input  ac_pkg::iq_t                     drx [NR],  // DRx_1 .. DRx_NR
  input  logic [$clog2(NR)-1:0]   sel,
  output ac_pkg::iq_t                     rx_in,
  output ac_pkg::iq_t                     drx_in
);

  always_comb begin
    rx_in  = rx[0];
    drx_in = drx[0];
    for (int j = 0; j < NR; j++) begin
      if (sel == j[$clog2(NR)-1:0]) begin
        rx_in  = rx[j];
        drx_in = drx[j];
      end
    end
  end

endmodule
