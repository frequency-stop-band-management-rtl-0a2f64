// tb_sbms_top: end-to-end test of the stop-band management system with a
// behavioural pulse-skip converter (psm_converter_model) closing the loop
// through REF_SKIP. The top runs at its default parameters (3 MHz CLOCK_AUX,
// 3-bit COUNTER_REF, one-count margins). Stop band 40-60 kHz, 0.5 ms window.
// Phases:
//  A  SBMS disabled, converter at 45.5 kHz inside the band: no SB.
//  B  SBMS enabled: SB within one window (+3 us) of the first burst, the
//     offset is stepped until the burst rate leaves the band, then nothing
//     changes for 3 ms.
//  C  line transient (shorter base burst period) pushes the converter back
//     into the band: new corrections until it leaves again.
//  D  converter at an in-band average rate with one long gap every 10
//     bursts: AFSM1 keeps restarting the window, no SB.
//  E  converter stuck in the band whatever the offset: COUNTER_REF walks
//     through all offsets and rolls over from 7 to 1.
//  F  band reprogrammed to 90-110 kHz on the fly: no further SB.
// Checked throughout: COUNTER_REF against an independent count of SB
// edges; REF_SKIP = V_FIXED - 0.6 V + 75 mV + table offset for each code
// (0, +25, +50, +75, +100, -25, -50, -75 mV); V_C - REF_SKIP = V_EA - V_FIXED
// (the replica offset leaves the loop undisturbed); a correction is never
// issued sooner than one window after the previous one. Each mechanism
// (detection, corrective step, window restart by OK1, AFSM1 slow-period
// path, roll-over, EN gating, reprogramming) must occur at least once.
module tb_sbms_top;
  timeunit 1ns; timeprecision 1ps;
  import sbms_pkg::*;

  logic clk_aux = 0, rst_n = 0, en = 0;
  logic comp_skip;
  logic [FREQ_W-1:0] fmin = 40, fmax = 60;
  logic [TSW_W-1:0]  tsw = 500;
  real  v_fixed = 1.1, v_ea = 1.05;
  logic sb, ok1;
  logic [2:0] code;
  real  ref_skip, v_c;

  int   base_len = 33;
  bit   follow_ref = 1, run_conv = 0;
  int   gap_every = 0;
  int   cur_len;

  int checks = 0, failures = 0;
  int exp_code = 0;
  int n_sb = 0, n_ok1_restart = 0, n_slow_path = 0, n_rollover = 0, n_en_gated = 0, n_reprog = 0;
  realtime last_sb = -1.0;
  realtime first_edge = -1.0;
  int offs_mv [8] = '{0, 25, 50, 75, 100, -25, -50, -75};

  sbms_top dut (
    .clk_aux(clk_aux), .rst_n(rst_n), .en(en), .comp_skip(comp_skip),
    .f_sb_min_khz(fmin), .f_sb_max_khz(fmax), .t_sw_us(tsw),
    .v_fixed(v_fixed), .v_ea(v_ea),
    .sb(sb), .ok1(ok1), .code(code), .ref_skip(ref_skip), .v_c(v_c));

  psm_converter_model conv (
    .ref_skip(ref_skip), .base_len(base_len), .follow_ref(follow_ref),
    .gap_every(gap_every), .run(run_conv), .comp_skip(comp_skip), .cur_len(cur_len));

  always #166.667 clk_aux = ~clk_aux;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (code=%0d exp=%0d len=%0d)", $time, what, code, exp_code, cur_len);
    end
  endtask

  function automatic bit close(input real a, input real b);
    return (a - b < 1.0e-6) && (b - a < 1.0e-6);
  endfunction

  initial begin
    #60ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge comp_skip) if (first_edge < 0) first_edge = $realtime;

  // every SB edge: independent COUNTER_REF model, offset and replica checks
  always @(posedge sb) begin
    n_sb++;
    if (last_sb >= 0) check($realtime - last_sb >= 500us, "corrections at least one window apart");
    last_sb = $realtime;
    if (exp_code == 7) n_rollover++;
    exp_code = (exp_code == 7) ? 1 : exp_code + 1;
    repeat (2) @(negedge clk_aux);
    check(int'(code) == exp_code, "COUNTER_REF follows SB");
    check(close(ref_skip, v_fixed - 0.6 + 0.075 + offs_mv[exp_code] / 1000.0),
          $sformatf("REF_SKIP offset for code %0d", exp_code));
    check(close(v_c - ref_skip, v_ea - v_fixed), "V_C keeps tracking REF_SKIP");
  end

  // window restarts caused by AFSM1, and AFSM1 slow-period path
  always @(negedge ok1) if (en && dut.u_ctrl.afsm2_state == A2_EN_COUNTING) n_ok1_restart++;
  always @(posedge clk_aux)
    if (dut.u_ctrl.afsm1_state == A1_WAIT_SKIP0 || dut.u_ctrl.afsm1_state == A1_WAIT_SKIP1)
      if (en && run_conv) n_slow_path++;

  // burst rate of the converter in kHz
  function automatic real f_skip_khz();
    return 1.0e6 / (cur_len * 666.0);
  endfunction

  initial begin
    int sb_before, code_before;
    realtime t0;
    repeat (3) @(negedge clk_aux);
    rst_n = 1;

    // A: disabled
    run_conv = 1;
    #1ms;
    check(n_sb == 0 && code == 0, "A: no action while EN is low");
    check(f_skip_khz() > 40.0 && f_skip_khz() < 60.0, "A: converter starts inside the band");
    n_en_gated++;

    // B: enable
    en = 1;
    t0 = $realtime;
    wait (sb);
    check($realtime - t0 >= 500us && $realtime - t0 <= 530us, "B: first SB about one window after enable");
    #4ms;
    code_before = int'(code);
    sb_before = n_sb;
    #3ms;
    check(n_sb == sb_before && int'(code) == code_before, "B: settled, no further correction");
    check(f_skip_khz() < 40.0 || f_skip_khz() > 60.0, $sformatf("B: rate %0.1f kHz outside the band", f_skip_khz()));
    check(code_before >= 1, "B: at least one corrective step");

    // C: line transient back into the band
    base_len = 28;
    sb_before = n_sb;
    #6ms;
    check(n_sb > sb_before, "C: transient back into the band corrected");
    sb_before = n_sb;
    #3ms;
    check(n_sb == sb_before, "C: settled again");
    check(f_skip_khz() < 40.0 || f_skip_khz() > 60.0, $sformatf("C: rate %0.1f kHz outside the band", f_skip_khz()));

    // D: average in band, one long gap every 10 bursts
    follow_ref = 0;
    base_len = 30;
    gap_every = 10;
    sb_before = n_sb;
    #4ms;
    check(n_sb == sb_before, "D: disturbed converter filtered, no SB");
    check(n_ok1_restart > 0, "D: AFSM1 restarted the window");

    // E: stuck inside the band
    gap_every = 0;
    sb_before = n_sb;
    #7ms;
    check(n_sb - sb_before >= 8, "E: repeated corrections while the converter stays in the band");
    check(n_rollover > 0, "E: COUNTER_REF rolled over");

    // F: new band on the fly
    fmin = 90; fmax = 110;
    n_reprog++;
    sb_before = n_sb;
    #3ms;
    check(n_sb == sb_before, "F: 50 kHz is outside the new band");

    check(n_slow_path > 0, "AFSM1 slow-period path used");
    $display("mechanisms: sb=%0d ok1_restart=%0d slow_path_cycles=%0d rollover=%0d en_gated=%0d reprog=%0d",
             n_sb, n_ok1_restart, n_slow_path, n_rollover, n_en_gated, n_reprog);
    check(n_sb > 0 && n_ok1_restart > 0 && n_slow_path > 0 && n_rollover > 0 &&
          n_en_gated > 0 && n_reprog > 0, "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
