// tb_sb_limits: self-checking test of the stop-band bound computation.
// For the four example stop bands (15-35, 40-60, 90-110, 135-155 kHz) and
// sampling windows of 0.5 ms and 1 ms, with a 3 MHz auxiliary clock, it
// compares the bounds of conditions (1) and (2) and the window length with
// values worked out here in floating point, and checks that bad programming
// (zero frequency, inverted band, zero window) is flagged invalid. One
// instance has no margins (exact inequalities), the other the default
// one-count margins on both conditions.
module tb_sb_limits;
  timeunit 1ns; timeprecision 1ps;
  import sbms_pkg::*;

  logic [FREQ_W-1:0] fmin, fmax;
  logic [TSW_W-1:0]  tsw;
  sb_limits_t        lim, lm;
  int checks = 0, failures = 0;

  int band_min [4] = '{15, 40, 90, 135};
  int band_max [4] = '{35, 60, 110, 155};
  int windows  [2] = '{500, 1000};

  sb_limits #(.F_AUX_KHZ(3000), .MARGIN1(0), .MARGIN2(0)) dut (
    .f_sb_min_khz(fmin), .f_sb_max_khz(fmax), .t_sw_us(tsw), .lim(lim));
  sb_limits #(.F_AUX_KHZ(3000)) dut_m (
    .f_sb_min_khz(fmin), .f_sb_max_khz(fmax), .t_sw_us(tsw), .lim(lm));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (fmin=%0d fmax=%0d tsw=%0d)", what, fmin, fmax, tsw);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) begin
      for (int w = 0; w < 2; w++) begin
        real fa, fl, fh, t;
        fmin = FREQ_W'(band_min[b]);
        fmax = FREQ_W'(band_max[b]);
        tsw  = TSW_W'(windows[w]);
        fa = 3.0e6; fl = band_min[b] * 1.0e3; fh = band_max[b] * 1.0e3; t = windows[w] * 1.0e-6;
        #1;
        check(int'(lim.p_min) == int'($ceil(fa / fh - 1.0e-9)), "p_min = ceil(Faux/Fmax)");
        check(int'(lim.p_max) == int'($ceil(fa / fl - 1.0e-9)), "p_max = ceil(Faux/Fmin)");
        check(int'(lim.n_min) == int'($ceil(t * fl - 1.0e-9)), "n_min = ceil(tsw*Fmin)");
        check(int'(lim.n_max) == int'($floor(t * fh + 1.0e-9)), "n_max = floor(tsw*Fmax)");
        check(int'(lim.t_sw_cycles) == int'($floor(t * fa + 1.0e-9)), "window = tsw*Faux");
        check(lim.valid, "valid");
        check(lm.p_min == lim.p_min - 1 && lm.p_max == lim.p_max + 1 &&
              lm.n_min == lim.n_min - 1 && lm.n_max == lim.n_max + 1 &&
              lm.t_sw_cycles == lim.t_sw_cycles, "one-count margins");
      end
    end
    // spot values of the 40-60 kHz band with a 0.5 ms window
    fmin = 40; fmax = 60; tsw = 500; #1;
    check(lim.p_min == 50 && lim.p_max == 75 && lim.n_min == 20 && lim.n_max == 30 &&
          lim.t_sw_cycles == 1500, "40-60 kHz spot values");
    check(lm.p_min == 49 && lm.p_max == 76 && lm.n_min == 19 && lm.n_max == 31,
          "40-60 kHz spot values with margins");
    // a band edge that does not divide the clock evenly
    fmin = 7; fmax = 13; tsw = 333; #1;
    check(lim.p_min == 231 && lim.p_max == 429 && lim.n_min == 3 && lim.n_max == 4 &&
          lim.t_sw_cycles == 999, "7-13 kHz rounding");
    fmin = 0;  fmax = 60; tsw = 500; #1; check(!lim.valid, "zero F_SB_MIN invalid");
    fmin = 60; fmax = 40; tsw = 500; #1; check(!lim.valid, "inverted band invalid");
    fmin = 40; fmax = 60; tsw = 0;   #1; check(!lim.valid, "zero window invalid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
