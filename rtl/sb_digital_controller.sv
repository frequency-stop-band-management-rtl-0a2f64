// sb_digital_controller: the SB digital controller of the stop-band
// management system.
//
// It oversamples the skip comparator output COMP_SKIP with the auxiliary
// clock CLOCK_AUX and raises SB when the converter has been running steadily
// inside the programmed stop band F_SB_MIN..F_SB_MAX. Two checks must both
// pass:
//   AFSM1 (afsm1)  every burst period, counted in CLOCK_AUX periods, lies in
//                  ceil(F_AUX/F_SB_MAX) .. ceil(F_AUX/F_SB_MIN)  -> OK1
//   AFSM2 (afsm2)  over a sampling window t_SW the number of bursts lies in
//                  t_SW*F_SB_MIN .. t_SW*F_SB_MAX, the window being restarted
//                  whenever OK1 falls                           -> SB
// The coarse per-burst check filters out transients, the window average gives
// the fine frequency decision, and no clock faster than a few times the
// highest stop-band frequency is needed.
//
// Both machines return to their initial state when the stop band or t_SW is
// reprogrammed (compared with the value held from the previous cycle), when
// the programming is invalid, and while EN is low.
//
// Interface: clk_aux/rst_n (asynchronous active-low reset); en; comp_skip
// (asynchronous to clk_aux); f_sb_min_khz, f_sb_max_khz (kHz); t_sw_us (us).
// Outputs sb (high for at least one cycle per detection), ok1, and the state
// of both machines for observation. Latency: SB rises t_SW plus a few
// CLOCK_AUX cycles after the rising edge that opened the window.
//
// Parameters: F_AUX_KHZ, auxiliary clock frequency, 3000 kHz as in the
// reference design; MARGIN1/MARGIN2, the widening of the bounds of
// conditions (1) and (2) in counts (see sb_limits). Reprogramming detection and the EN gating of the
// machines are this design's choices.
module sb_digital_controller
  import sbms_pkg::*;
#(
  parameter int unsigned F_AUX_KHZ = F_AUX_KHZ_DEFAULT,
  parameter int unsigned MARGIN1   = 1,
  parameter int unsigned MARGIN2   = 1
) (
  input  logic               clk_aux,
  input  logic               rst_n,
  input  logic               en,
  input  logic               comp_skip,
  input  logic [FREQ_W-1:0]  f_sb_min_khz,
  input  logic [FREQ_W-1:0]  f_sb_max_khz,
  input  logic [TSW_W-1:0]   t_sw_us,
  output logic               sb,
  output logic               ok1,
  output afsm1_state_t       afsm1_state,
  output afsm2_state_t       afsm2_state
);

  logic       comp, rise, fall;
  sb_limits_t lim;
  logic [FREQ_W-1:0] fmin_q, fmax_q;
  logic [TSW_W-1:0]  tsw_q;
  logic       reprog;
  logic       clr;
  logic [CNT1_W-1:0]  cnt1;
  logic [CNT2_W-1:0]  cnt2;
  logic [TIMER_W-1:0] timer;

  skip_sync u_sync (
    .clk        (clk_aux),
    .rst_n      (rst_n),
    .comp_async (comp_skip),
    .comp       (comp),
    .rise       (rise),
    .fall       (fall)
  );

  sb_limits #(.F_AUX_KHZ(F_AUX_KHZ), .MARGIN1(MARGIN1), .MARGIN2(MARGIN2)) u_limits (
    .f_sb_min_khz (f_sb_min_khz),
    .f_sb_max_khz (f_sb_max_khz),
    .t_sw_us      (t_sw_us),
    .lim          (lim)
  );

  always_ff @(posedge clk_aux or negedge rst_n) begin
    if (!rst_n) begin
      fmin_q <= '0;
      fmax_q <= '0;
      tsw_q  <= '0;
    end else begin
      fmin_q <= f_sb_min_khz;
      fmax_q <= f_sb_max_khz;
      tsw_q  <= t_sw_us;
    end
  end

  assign reprog = (fmin_q != f_sb_min_khz) || (fmax_q != f_sb_max_khz) || (tsw_q != t_sw_us);
  assign clr    = !en || reprog || !lim.valid;

  afsm1 u_afsm1 (
    .clk   (clk_aux),
    .rst_n (rst_n),
    .clr   (clr),
    .comp  (comp),
    .rise  (rise),
    .p_min (lim.p_min),
    .p_max (lim.p_max),
    .ok1   (ok1),
    .state (afsm1_state),
    .cnt1  (cnt1)
  );

  afsm2 u_afsm2 (
    .clk         (clk_aux),
    .rst_n       (rst_n),
    .clr         (clr),
    .comp        (comp),
    .rise        (rise),
    .ok1         (ok1),
    .n_min       (lim.n_min),
    .n_max       (lim.n_max),
    .t_sw_cycles (lim.t_sw_cycles),
    .sb          (sb),
    .state       (afsm2_state),
    .cnt2        (cnt2),
    .timer       (timer)
  );

  // the falling-edge pulse and the internal counters are kept for observation only
  logic unused;
  assign unused = ^{fall, cnt1, cnt2, timer};

endmodule
