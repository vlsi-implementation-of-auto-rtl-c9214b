// cfo_estimator: turns an auto-correlation value A into the normalized
// carrier frequency offset  eps = N / (2*pi*L_x) * angle(A).
//
// The angle is found by an iterative vectoring CORDIC. On in_valid the vector
// (Re A, Im A) is loaded; a vector in the left half plane is first negated and
// its angle register preset to pi, so the CORDIC only ever works in
// (-pi/2, pi/2). Each following clock performs one micro-rotation that drives
// Y toward zero and adds or subtracts atan(2^-i) to the angle. After ITER
// rotations the angle is a full four-quadrant atan2(Im A, Re A) in binary
// units (16 bits, pi = 2^15, wrapping at +-pi), and
//   eps = angle * N / (2 * L_x)      (15 fraction bits, 18-bit result)
// with L_x = 64 for a fine (LTS) value and L_x = 16 for a coarse (STS) one;
// both divisions are shifts. out_valid pulses ITER+1 cycles after in_valid;
// phase, eps and out_fine hold until the next result. A new in_valid restarts
// the unit. The CORDIC gain (about 1.647) only scales X and does not affect
// the angle.
//
// The CFO formula follows the published design, which leaves the arctangent to
// "CORDIC or LUT"; the iterative CORDIC, its widths and the angle format are
// this design's choices.
module cfo_estimator
#(
  parameter int IN_W  = ac_pkg::ACC_W,
  parameter int ITER  = 15,
  parameter int FFT_N = ac_pkg::FFT_N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_fine,   // 1: L_x = 64, 0: L_x = 16
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic                   out_fine,
  output logic signed [15:0]     phase,     // angle(A), pi = 2^15
  output logic signed [17:0]     eps,       // normalized CFO, 15 fraction bits
  output logic                   busy
);

  localparam int ANG_W = 16;
  localparam int EPS_W = 18;
  localparam int W     = IN_W + 2;          // room for the CORDIC gain
  localparam int IT_W  = $clog2(ITER + 1);

  // atan(2^-i) in units of pi/2^15: round(atan(2^-i) / pi * 2^15).
  function automatic logic signed [ANG_W-1:0] atan_tab(input logic [IT_W-1:0] i);
    case (i)
      0:  return 16'sd8192;
      1:  return 16'sd4836;
      2:  return 16'sd2555;
      3:  return 16'sd1297;
      4:  return 16'sd651;
      5:  return 16'sd326;
      6:  return 16'sd163;
      7:  return 16'sd81;
      8:  return 16'sd41;
      9:  return 16'sd20;
      10: return 16'sd10;
      11: return 16'sd5;
      12: return 16'sd3;
      13: return 16'sd1;
      14: return 16'sd1;
      default: return 16'sd0;
    endcase
  endfunction

  logic signed [W-1:0]     x, y;
  logic signed [ANG_W-1:0] z, z_nxt;
  logic signed [W-1:0]     x_nxt, y_nxt;
  logic [IT_W-1:0]         it;
  logic                    fine_q;

  always_comb begin
    if (!y[W-1]) begin
      x_nxt = x + (y >>> it);
      y_nxt = y - (x >>> it);
      z_nxt = z + atan_tab(it);
    end else begin
      x_nxt = x - (y >>> it);
      y_nxt = y + (x >>> it);
      z_nxt = z - atan_tab(it);
    end
  end

  // eps = angle * N / (2 L_x); the divisor is a power of two.
  function automatic logic signed [EPS_W-1:0] scale(input logic signed [ANG_W-1:0] a,
                                                     input logic is_fine);
    logic signed [EPS_W+7:0] p;
    p = (EPS_W+8)'(a) * (EPS_W+8)'(FFT_N);
    if (is_fine) return EPS_W'(p >>> $clog2(2 * ac_pkg::LTS_LEN));
    else         return EPS_W'(p >>> $clog2(2 * ac_pkg::STS_LEN));
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      z         <= '0;
      it        <= '0;
      busy      <= 1'b0;
      fine_q    <= 1'b0;
      out_valid <= 1'b0;
      out_fine  <= 1'b0;
      phase     <= '0;
      eps       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        // Left half plane: negate and start from pi (= -pi in 16 bits).
        if (in_re < 0) begin
          x <= -W'(in_re);
          y <= -W'(in_im);
          z <= 16'sh8000;
        end else begin
          x <= W'(in_re);
          y <= W'(in_im);
          z <= '0;
        end
        it     <= '0;
        busy   <= 1'b1;
        fine_q <= in_fine;
      end else if (busy) begin
        x  <= x_nxt;
        y  <= y_nxt;
        z  <= z_nxt;
        it <= it + 1'b1;
        if (it == IT_W'(ITER - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          out_fine  <= fine_q;
          phase     <= z_nxt;
          eps       <= scale(z_nxt, fine_q);
        end
      end
    end
  end

endmodule
