// afsm2: sampling-window check, condition (2), with COUNTER2 and the timer.
//
// A sampling window of t_SW opens at a COMP_SKIP rising edge. During it the
// window timer counts CLOCK_AUX periods and COUNTER2 counts COMP_SKIP rising
// edges (the opening edge included). When the timer reaches t_SW the count is
// compared with n_min..n_max of condition (2): inside, the machine goes to
// SB_DETECTED and raises SB; outside, it goes to NOT_IN_SB. The window is
// abandoned early, without waiting for the timeout, when COUNTER2 passes
// n_max or when OK1 from AFSM1 falls (a burst period outside the band was
// seen). In SB_DETECTED and NOT_IN_SB the timer and COUNTER2 are cleared and
// the machine returns to INITIAL once COMP_SKIP is low, ready for a new
// window at the next rising edge. So a correction is only requested after a
// whole window of bursts whose every period passed condition (1): transients
// restart the window instead of triggering a correction.
//
// States (numbered as in the state-flow of the design):
//   1 INITIAL      idle, timer and COUNTER2 cleared
//   2 EN_COUNTING  window open: COUNTER2 and timer enabled
//   3 SB_DETECTED  SB = 1
//   4 NOT_IN_SB    window rejected
//
// This design's choices: synchronous to CLOCK_AUX (the reference
// implementation is an asynchronous FSM whose idle loop 1<->2 follows the
// CLOCK_AUX level; here INITIAL simply waits for the rising edge); the timer
// counts from the opening edge, so the window covers exactly t_sw_cycles
// CLOCK_AUX periods and an edge on the timeout cycle belongs to the next
// window; SB stays high for as long as the machine is in state 3 (at least
// one cycle, until COMP_SKIP is low).
module afsm2
  import sbms_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,
  input  logic               comp,
  input  logic               rise,
  input  logic               ok1,
  input  logic [CNT2_W-1:0]  n_min,
  input  logic [CNT2_W-1:0]  n_max,
  input  logic [TIMER_W-1:0] t_sw_cycles,
  output logic               sb,
  output afsm2_state_t       state,
  output logic [CNT2_W-1:0]  cnt2,
  output logic [TIMER_W-1:0] timer
);

  afsm2_state_t state_d;
  logic         ok1_q;
  logic         ok1_fall;
  logic         timeout;
  logic         cond2;
  logic         over;

  assign ok1_fall = ok1_q & ~ok1;
  assign timeout  = (timer >= t_sw_cycles);
  assign cond2    = (cnt2 >= n_min) && (cnt2 <= n_max);
  assign over     = (cnt2 > n_max);

  always_comb begin
    state_d = state;
    unique case (state)
      A2_INITIAL:     if (rise) state_d = A2_EN_COUNTING;
      A2_EN_COUNTING: begin
        if (over || ok1_fall) state_d = A2_NOT_IN_SB;
        else if (timeout)     state_d = cond2 ? A2_SB_DETECTED : A2_NOT_IN_SB;
      end
      A2_SB_DETECTED: if (!comp) state_d = A2_INITIAL;
      A2_NOT_IN_SB:   if (!comp) state_d = A2_INITIAL;
      default:        state_d = A2_INITIAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A2_INITIAL;
      cnt2  <= '0;
      timer <= '0;
      ok1_q <= 1'b0;
    end else if (clr) begin
      state <= A2_INITIAL;
      cnt2  <= '0;
      timer <= '0;
      ok1_q <= 1'b0;
    end else begin
      state <= state_d;
      ok1_q <= ok1;
      if (state_d == A2_EN_COUNTING) begin
        if (state == A2_INITIAL) begin
          cnt2  <= CNT2_W'(1);
          timer <= TIMER_W'(1);
        end else begin
          if (rise && cnt2 != '1) cnt2 <= cnt2 + 1'b1;
          if (timer != '1)        timer <= timer + 1'b1;
        end
      end else begin
        cnt2  <= '0;
        timer <= '0;
      end
    end
  end

  assign sb = (state == A2_SB_DETECTED);

  // A window never stays open past its timeout
  a_window_len: assert property (@(posedge clk) disable iff (!rst_n || clr)
    (state == A2_EN_COUNTING) |-> (timer <= t_sw_cycles) || (t_sw_cycles == '0));

endmodule
