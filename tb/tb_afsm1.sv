// tb_afsm1: self-checking test of the burst-period check (AFSM1 + COUNTER1).
// COMP_SKIP is generated here directly in the CLOCK_AUX domain (level and
// rising-edge pulse), as a sequence of bursts whose period and high time are
// chosen around the bounds of the 40-60 kHz band at 3 MHz (p_min = 50,
// p_max = 75): periods 49, 50, 51, 74, 75, 76, far below the band (state
// 5/6 path, with long and short high times) and random ones. For every
// burst it checks, against a reference worked out from the period alone:
//  - at the closing rising edge, COUNTER1 holds the period (if <= p_max+1);
//  - one cycle later OK1 equals "p_min <= period <= p_max";
//  - for a period above p_max+1, OK1 is already low at the closing edge and
//    fell exactly p_max + 2 cycles after the opening edge.
// Also checks that `clr` returns OK1 low and waits for a new edge.
module tb_afsm1;
  timeunit 1ns; timeprecision 1ps;
  import sbms_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  logic comp = 0, rise = 0;
  logic [CNT1_W-1:0] p_min = 50, p_max = 75;
  logic ok1;
  afsm1_state_t state;
  logic [CNT1_W-1:0] cnt1;
  int checks = 0, failures = 0;
  int slow_paths = 0, in_band = 0, out_fast = 0;

  afsm1 dut (.clk(clk), .rst_n(rst_n), .clr(clr), .comp(comp), .rise(rise),
             .p_min(p_min), .p_max(p_max), .ok1(ok1), .state(state), .cnt1(cnt1));

  always #166.667 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (ok1=%0b cnt1=%0d state=%0d)", $time, what, ok1, cnt1, state);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one burst of `period` cycles whose COMP_SKIP is high for `high` cycles;
  // the rising edge is driven on the first cycle. Returns with the cycle
  // after the burst about to start.
  task automatic burst(input int period, input int high, input bit check_prev, input int prev_period);
    @(negedge clk);
    comp = 1; rise = 1;
    if (check_prev) begin
      if (prev_period <= int'(p_max) + 1) begin
        check(int'(cnt1) == prev_period, $sformatf("COUNTER1 holds period %0d", prev_period));
        // a period of exactly p_max+1 is rejected by the edge itself (state 4)
        check(ok1, "OK1 still high before the closing edge");
      end else begin
        check(!ok1, $sformatf("OK1 low at the closing edge of slow period %0d", prev_period));
      end
    end
    @(negedge clk);
    rise = 0;
    if (high == 1) comp = 0;
    if (check_prev) begin
      bit exp;
      exp = (prev_period > int'(p_max) + 1) ? 1'b1 :
            (prev_period >= int'(p_min) && prev_period <= int'(p_max));
      check(ok1 == exp, $sformatf("OK1 after a period of %0d", prev_period));
    end
    for (int c = 2; c < period; c++) begin
      @(negedge clk);
      if (c >= high) comp = 0;
      if (period > int'(p_max)) begin
        // OK1 low from p_max+2 cycles after the opening edge
        if (c == int'(p_max) + 1) check(ok1, "OK1 high until COUNTER1 passes p_max");
        if (c == int'(p_max) + 2) check(!ok1, "OK1 falls once COUNTER1 passes p_max");
      end
    end
  endtask

  initial begin
    int periods [$];
    int highs [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!ok1, "OK1 low after reset");
    periods = '{60, 49, 50, 51, 74, 75, 76, 62, 200, 60, 120, 55, 100, 51};
    highs   = '{2,  2,  6,  2,  2,  4,  2,  3,  2,   2,  90,  2,  80,  1};
    for (int k = 0; k < 40; k++) begin
      periods.push_back(40 + int'($urandom_range(0, 50)));
      highs.push_back(1 + int'($urandom_range(0, 5)));
    end
    for (int k = 0; k < periods.size(); k++) begin
      burst(periods[k], highs[k], k > 0, k > 0 ? periods[k - 1] : 0);
      if (periods[k] > int'(p_max)) slow_paths++;
      else if (periods[k] >= int'(p_min)) in_band++;
      else out_fast++;
    end
    // close the last period
    burst(60, 2, 1, periods[periods.size() - 1]);
    check(slow_paths > 0 && in_band > 0 && out_fast > 0, "all three period classes exercised");
    // clr: back to waiting for a first edge, OK1 low
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(!ok1 && state == A1_WAIT_SKIP1, "clr returns to waiting for a rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
