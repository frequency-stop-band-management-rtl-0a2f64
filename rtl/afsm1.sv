// afsm1: burst-period check, condition (1), with COUNTER1.
//
// COUNTER1 measures how many CLOCK_AUX periods separate two consecutive
// COMP_SKIP rising edges (one burst period of the converter in pulse-skip
// mode). At each rising edge the finished measurement is compared with the
// bounds p_min..p_max of condition (1). OK1 stays high while every burst
// period lies inside the band and drops as soon as one does not; AFSM2 uses
// its falling edge to restart the sampling window.
//
// States follow the state-flow of the design, numbered 1..6:
//   1 INITIAL    a burst began, its period is being measured      OK1=1
//   2 EN_COUNTER COUNTER1 running, COMP_SKIP still high            OK1=1
//   3 WAIT       COUNTER1 running, COMP_SKIP low, waiting for the
//                next burst                                        OK1=1
//   4 NOT_IN_SB  the last period failed condition (1); a new one
//                is already being measured                         OK1=0
//   5 WAIT_SKIP0 the period already exceeds p_max while COMP_SKIP
//                is high: wait for it to fall                      OK1=0
//   6 WAIT_SKIP1 same, COMP_SKIP low: wait for the next burst      OK1=0
// Arcs: 1->2 on the next CLOCK_AUX edge; 2->3 when COMP_SKIP is low;
// 3->1 on a rising edge with condition (1) true, 3->4 with it false;
// 4->2 on the next CLOCK_AUX edge; 2->5 and 3->6 once COUNTER1 exceeds p_max
// (no later edge can satisfy (1): the converter is far below the band);
// 5->6 when COMP_SKIP is low; 6->1 on a rising edge.
//
// This design's choices: the machine is synchronous to CLOCK_AUX and fed
// by skip_sync (the reference implementation is an asynchronous FSM);
// reset and `clr` enter state 6, so the first burst period is measured from
// the first rising edge seen; COUNTER1 is loaded with 1 on the rising edge
// and counts in states 1-4, so that at the next rising edge it holds exactly
// the number of CLOCK_AUX periods between the two edges; the exit to states
// 5/6 happens when COUNTER1 exceeds p_max, matching the "<=" of (1).
//
// Interface: comp/rise from skip_sync, bounds from sb_limits, clr restarts
// the machine (stop band reprogrammed or SBMS disabled). Outputs ok1, the
// state and the COUNTER1 value.
module afsm1
  import sbms_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              comp,
  input  logic              rise,
  input  logic [CNT1_W-1:0] p_min,
  input  logic [CNT1_W-1:0] p_max,
  output logic              ok1,
  output afsm1_state_t      state,
  output logic [CNT1_W-1:0] cnt1
);

  afsm1_state_t state_d;
  logic         cond1;
  logic         too_slow;

  assign cond1    = (cnt1 >= p_min) && (cnt1 <= p_max);
  assign too_slow = (cnt1 > p_max);

  always_comb begin
    state_d = state;
    unique case (state)
      A1_INITIAL:    state_d = A1_EN_COUNTER;
      A1_EN_COUNTER: begin
        if (!comp)         state_d = A1_WAIT;
        else if (too_slow) state_d = A1_WAIT_SKIP0;
      end
      A1_WAIT: begin
        if (rise)          state_d = cond1 ? A1_INITIAL : A1_NOT_IN_SB;
        else if (too_slow) state_d = A1_WAIT_SKIP1;
      end
      A1_NOT_IN_SB:  state_d = A1_EN_COUNTER;
      A1_WAIT_SKIP0: if (!comp) state_d = A1_WAIT_SKIP1;
      A1_WAIT_SKIP1: if (rise)  state_d = A1_INITIAL;
      default:       state_d = A1_WAIT_SKIP1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A1_WAIT_SKIP1;
      cnt1  <= '0;
    end else if (clr) begin
      state <= A1_WAIT_SKIP1;
      cnt1  <= '0;
    end else begin
      state <= state_d;
      if ((state == A1_WAIT || state == A1_WAIT_SKIP1) && rise)
        cnt1 <= CNT1_W'(1);
      else if (state == A1_WAIT_SKIP0 || state == A1_WAIT_SKIP1)
        cnt1 <= '0;
      else if (cnt1 != '1)
        cnt1 <= cnt1 + 1'b1;
    end
  end

  assign ok1 = (state == A1_INITIAL) || (state == A1_EN_COUNTER) || (state == A1_WAIT);

  // OK1 may only be low in states 4, 5 and 6
  a_ok1_states: assert property (@(posedge clk) disable iff (!rst_n)
    !ok1 |-> (state inside {A1_NOT_IN_SB, A1_WAIT_SKIP0, A1_WAIT_SKIP1}));

endmodule
