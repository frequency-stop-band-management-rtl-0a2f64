// sbms_top: stop-band management system (SBMS) for a peak-current-mode
// DC-DC converter in pulse-skip mode.
//
// At light load the converter runs bursts of K switching cycles separated by
// M idle cycles; the burst rate F_SKIP can land in a frequency band that must
// be avoided. The SBMS watches the skip comparator output COMP_SKIP, and when
// the converter sits steadily inside the programmed band it raises SB, which
// advances COUNTER_REF. The counter value selects an offset that two equal
// offset generators add both to the fixed skip reference (giving REF_SKIP,
// the programmed burst peak current) and to the error-amplifier output V_EA
// (giving the control voltage V_C). A new peak current changes K and/or M and
// so F_SKIP, while V_C keeps tracking REF_SKIP, so the output voltage sees no
// step. The offset is stepped once per detection until the band is left.
//
// Blocks: sb_digital_controller (AFSM1, AFSM2, counters, window timer),
// counter_ref, and two dcog offset generators (behavioural analog models).
// The skip comparator, error amplifier, PWM comparator and power stage belong
// to the converter and connect through the ports.
//
// Ports: clk_aux (CLOCK_AUX, 3 MHz by default), rst_n, en, comp_skip
// (asynchronous), f_sb_min_khz / f_sb_max_khz / t_sw_us (stop-band and
// sampling-window programming), v_fixed and v_ea (real, volts) in;
// sb, ok1, code (COUNTER_REF), ref_skip and v_c (real, volts) out.
module sbms_top
  import sbms_pkg::*;
#(
  parameter int unsigned F_AUX_KHZ = F_AUX_KHZ_DEFAULT,
  parameter int unsigned N         = REF_N_DEFAULT,
  parameter int unsigned MARGIN1   = 1,
  parameter int unsigned MARGIN2   = 1
) (
  input  logic              clk_aux,
  input  logic              rst_n,
  input  logic              en,
  input  logic              comp_skip,
  input  logic [FREQ_W-1:0] f_sb_min_khz,
  input  logic [FREQ_W-1:0] f_sb_max_khz,
  input  logic [TSW_W-1:0]  t_sw_us,
  input  real               v_fixed,
  input  real               v_ea,
  output logic              sb,
  output logic              ok1,
  output logic [N-1:0]      code,
  output real               ref_skip,
  output real               v_c
);

  afsm1_state_t afsm1_state;
  afsm2_state_t afsm2_state;
  logic [N-1:0] steps_ref, steps_ea;

  sb_digital_controller #(.F_AUX_KHZ(F_AUX_KHZ), .MARGIN1(MARGIN1), .MARGIN2(MARGIN2)) u_ctrl (
    .clk_aux      (clk_aux),
    .rst_n        (rst_n),
    .en           (en),
    .comp_skip    (comp_skip),
    .f_sb_min_khz (f_sb_min_khz),
    .f_sb_max_khz (f_sb_max_khz),
    .t_sw_us      (t_sw_us),
    .sb           (sb),
    .ok1          (ok1),
    .afsm1_state  (afsm1_state),
    .afsm2_state  (afsm2_state)
  );

  counter_ref #(.N(N)) u_counter_ref (
    .clk   (clk_aux),
    .rst_n (rst_n),
    .sb    (sb),
    .code  (code)
  );

  // offset on the skip reference
  dcog #(.N(N)) u_dcog_ref (
    .in_v  (v_fixed),
    .code  (code),
    .out_v (ref_skip),
    .steps (steps_ref)
  );

  // replica offset on the error amplifier output
  dcog #(.N(N)) u_dcog_ea (
    .in_v  (v_ea),
    .code  (code),
    .out_v (v_c),
    .steps (steps_ea)
  );

  logic unused;
  assign unused = ^{afsm1_state, afsm2_state, steps_ref, steps_ea};

endmodule
