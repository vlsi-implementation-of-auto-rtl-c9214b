// ac_controller: the 6-bit counter and control logic of the time-multiplexed
// auto-correlator.
//
// Each estimation runs over two consecutive training symbols: a capture symbol
// (8th STS, or LTS 1) and a correlate symbol (9th STS, or LTS 2). The counter
// counts the samples of the current symbol (0..15 for STS, 0..63 for LTS).
// The branch that owns the present sample is a 2-bit field of the counter:
// bits [3:2] during coarse estimation (4 samples per branch) and bits [5:4]
// during fine estimation (16 samples per branch). That field is both the Ctrl
// Mux select and, decoded, the shift enable of the owning branch's delay
// register (Dly_en_Coarse / Dly_en_Fine). During the correlate symbol the AC
// block is told to multiply, with strobes for the first and the last product
// of the window.
//
// Timing: coarse_start / fine_start are high together with the first sample
// of the 8th STS / LTS 1 (both with in_valid), and that sample already counts
// as sample 0; every output is a combinational function of the state, the
// counter and these inputs, valid in the same cycle as the sample. fine_start
// wins over coarse_start and either restarts a running estimation. The
// counter width and the counter-bit branch fields follow the published
// architecture; the phase state register and the start pulses are this
// design's additions, since a 6-bit counter alone cannot tell LTS 1 from LTS 2.
module ac_controller
#(
  parameter int NR    = ac_pkg::NR,
  parameter int CNT_W = $clog2(ac_pkg::LTS_LEN)   // 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    coarse_start,
  input  logic                    fine_start,
  output logic [NR-1:0]           dly_en,    // per-branch delay shift enable
  output logic                    tap_fine,  // delay line tap select
  output logic [$clog2(NR)-1:0]   sel,       // Ctrl Mux branch select
  output logic                    ac_valid,  // multiply/accumulate this sample
  output logic                    ac_first,  // first product of the window
  output logic                    ac_last,   // last product of the window
  output logic                    ac_fine,   // window is fine (LTS)
  output logic                    busy
);

  localparam int SEL_W    = $clog2(NR);
  localparam int C_LSB    = $clog2(ac_pkg::STS_LEN / NR);  // 2
  localparam int F_LSB    = $clog2(ac_pkg::LTS_LEN / NR);  // 4

  typedef enum logic [2:0] {
    S_IDLE,
    S_C_CAP,   // 8th STS: fill delay registers, 4 samples per branch
    S_C_COR,   // 9th STS: correlate, 4 samples per branch
    S_F_CAP,   // LTS 1: fill delay registers, 16 samples per branch
    S_F_COR    // LTS 2: correlate, 16 samples per branch
  } state_t;

  state_t           st, cur_st, nxt_st;
  logic [CNT_W-1:0] cnt, cur_cnt;
  logic             fine, cor, sym_last;

  // A start pulse takes effect on the sample it comes with.
  always_comb begin
    if (fine_start) begin
      cur_st  = S_F_CAP;
      cur_cnt = '0;
    end else if (coarse_start) begin
      cur_st  = S_C_CAP;
      cur_cnt = '0;
    end else begin
      cur_st  = st;
      cur_cnt = cnt;
    end
  end

  assign fine     = (cur_st == S_F_CAP) || (cur_st == S_F_COR);
  assign cor      = (cur_st == S_C_COR) || (cur_st == S_F_COR);
  assign busy     = (cur_st != S_IDLE);
  assign sym_last = fine ? (cur_cnt == CNT_W'(ac_pkg::LTS_LEN - 1))
                         : (cur_cnt == CNT_W'(ac_pkg::STS_LEN - 1));

  // Dly_en_Fine = cnt[5:4], Dly_en_Coarse = cnt[3:2], muxed by the task.
  assign sel      = fine ? cur_cnt[F_LSB +: SEL_W] : cur_cnt[C_LSB +: SEL_W];
  assign dly_en   = (in_valid && busy) ? (NR'(1) << sel) : '0;
  assign tap_fine = fine;
  assign ac_valid = in_valid && cor;
  assign ac_first = ac_valid && (cur_cnt == '0);
  assign ac_last  = ac_valid && sym_last;
  assign ac_fine  = fine;

  always_comb begin
    unique case (cur_st)
      S_C_CAP: nxt_st = S_C_COR;
      S_F_CAP: nxt_st = S_F_COR;
      default: nxt_st = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st  <= S_IDLE;
      cnt <= '0;
    end else if (in_valid && busy) begin
      if (sym_last) begin
        st  <= nxt_st;
        cnt <= '0;
      end else begin
        st  <= cur_st;
        cnt <= cur_cnt + 1'b1;
      end
    end else begin
      st  <= cur_st;
      cnt <= cur_cnt;
    end
  end

  // Exactly one branch shifts at a time, and only while an estimation runs.
  a_one_branch: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(dly_en));
  a_last_valid: assert property (@(posedge clk) disable iff (!rst_n) ac_last |-> ac_valid);

endmodule
