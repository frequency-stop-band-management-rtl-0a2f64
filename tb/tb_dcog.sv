// tb_dcog: self-checking test of the offset generator model.
// Applies every code and a few input voltages and compares the output with
// OUT = IN - V_GS + steps * 25 mV (V_GS = 0.6 V, 25 mV per resistor segment),
// where steps is worked out here from the offset table plus the 75 mV
// baseline. It also checks that two generators with the same code shift
// different inputs by the same amount, which is what keeps V_C on REF_SKIP.
module tb_dcog;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 3;
  real in_a, in_b, out_a, out_b;
  logic [N-1:0] code;
  logic [N-1:0] steps_a, steps_b;
  int checks = 0, failures = 0;
  int table_steps [8] = '{3, 4, 5, 6, 7, 2, 1, 0};

  dcog #(.N(N)) dut_a (.in_v(in_a), .code(code), .out_v(out_a), .steps(steps_a));
  dcog #(.N(N)) dut_b (.in_v(in_b), .code(code), .out_v(out_b), .steps(steps_b));

  function automatic bit close(input real a, input real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3; v++) begin
      for (int c = 0; c < 8; c++) begin
        real expect_a;
        in_a = 0.8 + 0.35 * v;
        in_b = 1.5 - 0.2 * v;
        code = N'(c);
        #1;
        expect_a = in_a - 0.6 + 0.025 * table_steps[c];
        checks++;
        if (!close(out_a, expect_a)) begin
          failures++;
          $display("FAIL: code %0d in %f out %f expected %f", c, in_a, out_a, expect_a);
        end
        checks++;
        if (!close(out_a - in_a, out_b - in_b)) begin
          failures++;
          $display("FAIL: replica shift differs for code %0d", c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
