// tb_sb_digital_controller: self-checking test of the SB digital controller
// with a COMP_SKIP that is asynchronous to CLOCK_AUX.
// The converter is represented by a burst generator: COMP_SKIP rises on a
// falling edge of a 666 ns converter clock (slightly off the 333.33 ns
// CLOCK_AUX, so the phase drifts), stays high for K = 3 converter cycles and
// repeats every `len` converter cycles, i.e. F_SKIP = 1 / (len * 666 ns).
// Scenarios, each over 4 ms:
//  - all four example stop bands (15-35, 40-60, 90-110, 135-155 kHz) with a
//    0.5 ms window: a burst rate in the middle of the band must raise SB,
//    the first time between t_SW and t_SW + 3 us after the first burst;
//    rates 15 % below and above the band must never raise SB;
//  - the same with a 1 ms window for one band;
//  - bursts whose average rate lies in the band but whose individual periods
//    alternate far below and above it: condition (2) alone would hold, no SB;
//  - an in-band train disturbed by one long gap every 10 bursts: the window
//    keeps being restarted, no SB;
//  - EN low: no SB; reprogramming the band in the middle of a window
//    restarts it (first SB one full window after the change).
module tb_sb_digital_controller;
  timeunit 1ns; timeprecision 1ps;
  import sbms_pkg::*;

  localparam real TS = 666.0;   // converter clock period, ns
  logic clk_aux = 0, rst_n = 0, en = 0, comp_skip = 0;
  logic [FREQ_W-1:0] fmin, fmax;
  logic [TSW_W-1:0]  tsw;
  logic sb, ok1;
  afsm1_state_t s1;
  afsm2_state_t s2;
  int checks = 0, failures = 0;

  // burst pattern: lengths (in converter cycles) of consecutive bursts, cycled
  int  pattern [$];
  bit  gen_on = 0;
  realtime first_edge = -1.0;
  realtime first_sb = -1.0;
  int  sb_count = 0;
  int  n_sb = 0, n_quiet = 0, n_filter = 0, n_reprog = 0, n_en = 0;

  sb_digital_controller #(.F_AUX_KHZ(3000)) dut (
    .clk_aux(clk_aux), .rst_n(rst_n), .en(en), .comp_skip(comp_skip),
    .f_sb_min_khz(fmin), .f_sb_max_khz(fmax), .t_sw_us(tsw),
    .sb(sb), .ok1(ok1), .afsm1_state(s1), .afsm2_state(s2));

  always #166.667 clk_aux = ~clk_aux;

  // burst generator, stepped by the converter clock
  initial begin
    int idx, pos;
    idx = 0; pos = 0;
    forever begin
      #(TS);
      if (!gen_on || pattern.size() == 0) begin
        comp_skip = 0; idx = 0; pos = 0;
      end else begin
        comp_skip = (pos < 3);
        if (pos == 0 && first_edge < 0) first_edge = $realtime;
        pos++;
        if (pos >= pattern[idx]) begin
          pos = 0;
          idx = (idx + 1) % pattern.size();
        end
      end
    end
  end

  always @(posedge sb) begin
    sb_count++;
    if (first_sb < 0) first_sb = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (sb_count=%0d first_edge=%0t first_sb=%0t)",
               $time, what, sb_count, first_edge, first_sb);
    end
  endtask

  initial begin
    #120ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run pattern `p` for `dur`, starting with a cleared controller
  task automatic run(input int p [$], input realtime dur);
    gen_on = 0;
    en = 0;
    #5us;
    pattern = p;
    sb_count = 0;
    first_sb = -1.0;
    first_edge = -1.0;
    en = 1;
    #1us;
    gen_on = 1;
    repeat (int'(dur / 1us)) #1us;
    gen_on = 0;
  endtask

  function automatic int len_for(input real f_khz);
    return int'(1.0e6 / (f_khz * TS));
  endfunction

  initial begin
    static int bmin [4] = '{15, 40, 90, 135};
    static int bmax [4] = '{35, 60, 110, 155};
    realtime lat;
    tsw = 500; fmin = 40; fmax = 60;
    repeat (3) @(negedge clk_aux);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      real fc;
      fmin = FREQ_W'(bmin[b]); fmax = FREQ_W'(bmax[b]);
      fc = (bmin[b] + bmax[b]) / 2.0;
      run('{len_for(fc)}, 4ms);
      fc = 1.0e6 / (len_for(fc) * TS);
      lat = first_sb - first_edge;
      check(sb_count >= 1, $sformatf("SB raised at %0.1f kHz in band %0d-%0d", fc, bmin[b], bmax[b]));
      check(lat >= 500us && lat <= 503us, $sformatf("first SB one window after the first burst (%0t)", lat));
      n_sb++;
      run('{len_for(bmin[b] * 0.85)}, 4ms);
      check(sb_count == 0, $sformatf("no SB below band %0d-%0d", bmin[b], bmax[b]));
      run('{len_for(bmax[b] * 1.15)}, 4ms);
      check(sb_count == 0, $sformatf("no SB above band %0d-%0d", bmin[b], bmax[b]));
      n_quiet += 2;
    end
    // 1 ms window
    fmin = 40; fmax = 60; tsw = 1000;
    run('{len_for(50.0)}, 4ms);
    lat = first_sb - first_edge;
    check(sb_count >= 1 && lat >= 1000us && lat <= 1003us, "1 ms window: SB one window after the first burst");
    tsw = 500;
    // average 50 kHz, periods alternating 83 kHz / 36 kHz
    run('{len_for(83.0), len_for(35.7)}, 4ms);
    check(sb_count == 0, "average in band, individual periods outside: no SB");
    n_filter++;
    // 50 kHz with a 25 kHz gap every 10th burst
    run('{30, 30, 30, 30, 30, 30, 30, 30, 30, 60}, 4ms);
    check(sb_count == 0, "periodic out-of-band gap keeps restarting the window: no SB");
    n_filter++;
    // EN low
    pattern = '{30};
    en = 0; sb_count = 0; gen_on = 1;
    #3ms;
    check(sb_count == 0, "EN low: no SB");
    n_en++;
    gen_on = 0;
    // reprogramming in the middle of a window restarts both machines: the
    // rate stays inside the new band, yet SB must wait a full new window
    fmin = 40; fmax = 60;
    run('{30}, 300us);
    pattern = '{30};
    gen_on = 1;
    first_sb = -1.0;
    fmin = 45; fmax = 55;
    lat = $realtime;
    #2ms;
    check(first_sb - lat >= 500us && first_sb - lat <= 525us,
          $sformatf("after reprogramming, SB one window after the next burst (%0t)", first_sb - lat));
    n_reprog++;
    check(n_sb > 0 && n_quiet > 0 && n_filter > 0 && n_reprog > 0 && n_en > 0, "all scenarios ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
