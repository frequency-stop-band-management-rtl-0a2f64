// tb_counter_ref: self-checking test of COUNTER_REF.
// Pulses SB (single-cycle and long pulses) and checks the code sequence
// 0 -> 1 -> ... -> 7 -> 1 -> 2 ... against an independent model, that a long
// SB pulse advances the code only once, and that the code changes exactly
// one clock after SB is first seen high.
module tb_counter_ref;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 3;
  logic clk = 0, rst_n = 0, sb = 0;
  logic [N-1:0] code;
  int checks = 0, failures = 0;
  int expected;

  counter_ref #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .sb(sb), .code(code));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (code=%0d expected=%0d)", what, code, expected);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expected = 0;
    repeat (3) @(negedge clk);
    check(code == 0, "reset value");
    rst_n = 1;
    for (int it = 1; it <= 20; it++) begin
      int len;
      len = (it % 3 == 0) ? 5 : 1;
      @(negedge clk) sb = 1;
      check(code == N'(expected), "no change before the SB edge is sampled");
      expected = (expected == (1 << N) - 1) ? 1 : expected + 1;
      @(negedge clk);
      check(code == N'(expected), "step one clock after SB");
      repeat (len - 1) @(negedge clk);
      sb = 0;
      repeat (2) @(negedge clk);
      check(code == N'(expected), "long SB pulse counts once");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
