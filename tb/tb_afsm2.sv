// tb_afsm2: self-checking test of the sampling-window check (AFSM2,
// COUNTER2 and the window timer).
// COMP_SKIP and OK1 are generated here in the CLOCK_AUX domain. Bounds are
// those of the 40-60 kHz band with a 0.5 ms window at 3 MHz: n_min = 20,
// n_max = 30, window = 1500 cycles. Each scenario starts from a cleared
// machine and sends a steady burst train of period P (high for 2 cycles).
// The reference counts the edges falling in the first window, ceil(1500/P),
// and predicts: SB exactly 1501 cycles after the opening edge when the count
// is in 20..30; an early rejection (no SB, state NOT_IN_SB before the
// timeout) when the count passes 30; a rejection at the timeout otherwise.
// A further scenario drops OK1 in the middle of an in-band window and checks
// that the window is abandoned and SB comes one full window after the next
// opening edge.
module tb_afsm2;
  timeunit 1ns; timeprecision 1ps;
  import sbms_pkg::*;

  localparam int T = 1500;
  logic clk = 0, rst_n = 0, clr = 0;
  logic comp = 0, rise = 0, ok1 = 1;
  logic [CNT2_W-1:0]  n_min = 20, n_max = 30;
  logic [TIMER_W-1:0] t_sw = TIMER_W'(T);
  logic sb;
  afsm2_state_t state;
  logic [CNT2_W-1:0]  cnt2;
  logic [TIMER_W-1:0] timer;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_detect = 0, n_early = 0, n_timeout_reject = 0, n_ok1_abort = 0;

  afsm2 dut (.clk(clk), .rst_n(rst_n), .clr(clr), .comp(comp), .rise(rise), .ok1(ok1),
             .n_min(n_min), .n_max(n_max), .t_sw_cycles(t_sw),
             .sb(sb), .state(state), .cnt2(cnt2), .timer(timer));

  always #166.667 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (sb=%0b cnt2=%0d timer=%0d state=%0d)", $time, what, sb, cnt2, timer, state);
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run a burst train of period p for `cycles` cycles; drop OK1 for one cycle
  // at cycle `ok1_drop` (negative: never). Records the cycle (relative to the
  // first edge) of the first SB and of the first entry into NOT_IN_SB.
  task automatic train(input int p, input int cycles, input int ok1_drop,
                       output int first_sb, output int first_reject);
    first_sb = -1;
    first_reject = -1;
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      if (sb && first_sb < 0) first_sb = c;
      if (state == A2_NOT_IN_SB && first_reject < 0) first_reject = c;
      comp = (c % p) < 2;
      rise = (c % p) == 0;
      ok1  = (c != ok1_drop);
    end
    @(negedge clk);
    comp = 0; rise = 0; ok1 = 1;
  endtask

  task automatic restart();
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    check(state == A2_INITIAL && !sb && cnt2 == 0 && timer == 0, "clr returns to INITIAL");
  endtask

  initial begin
    static int periods [$] = '{66, 50, 75, 60, 72, 40, 45, 49, 100, 80, 76, 300};
    int fs, fr;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (periods[i]) begin
      int p, edges;
      p = periods[i];
      edges = (T + p - 1) / p;
      restart();
      train(p, T + 10, -1, fs, fr);
      if (edges >= 20 && edges <= 30) begin
        check(fs == T + 1, $sformatf("P=%0d (%0d edges): SB one window after the opening edge (got %0d)", p, edges, fs));
        check(fr < 0, $sformatf("P=%0d: no rejection", p));
        n_detect++;
      end else if (edges > 30) begin
        // rejected on the cycle after the 31st edge, long before the timeout
        check(fs < 0, $sformatf("P=%0d: no SB", p));
        check(fr == 30 * p + 2, $sformatf("P=%0d: early rejection at edge 31 (got %0d)", p, fr));
        n_early++;
      end else begin
        check(fs < 0, $sformatf("P=%0d: no SB", p));
        check(fr == T + 1, $sformatf("P=%0d: rejection at the timeout (got %0d)", p, fr));
        n_timeout_reject++;
      end
    end
    // OK1 falls during an in-band window: abandon, reopen at the next edge
    restart();
    train(66, 3 * T, 700, fs, fr);
    // 700 lies inside the burst starting at 660; the next edge is at 726
    check(fr == 701, $sformatf("OK1 fall abandons the window (got %0d)", fr));
    check(fs == 726 + T + 1, $sformatf("new window from the next edge (SB at %0d)", fs));
    n_ok1_abort++;
    check(n_detect > 0 && n_early > 0 && n_timeout_reject > 0 && n_ok1_abort > 0,
          "every outcome exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
