// tb_dcog_decoder: self-checking test of the offset decoder.
// For every COUNTER_REF code it compares the signed offset with the
// iteration/offset table of the design (0, +25, +50, +75, +100, -25, -50,
// -75 mV in 25 mV steps), the resistor step count with offset + 3 (the
// baseline that keeps the generator's offset positive), and checks that the
// segment enables form a thermometer code with `steps` ones.
module tb_dcog_decoder;
  timeunit 1ns; timeprecision 1ps;

  localparam int N = 3;
  logic [N-1:0]      code;
  logic signed [N:0] offset;
  logic [N-1:0]      steps;
  logic [(2**N)-2:0] seg_en;
  int checks = 0, failures = 0;

  // offsets in mV, indexed by code
  int table_mv [8] = '{0, 25, 50, 75, 100, -25, -50, -75};

  dcog_decoder #(.N(N)) dut (.code(code), .offset(offset), .steps(steps), .seg_en(seg_en));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      int ones;
      code = N'(c);
      #1;
      checks++;
      if (int'(offset) * 25 != table_mv[c]) begin
        failures++;
        $display("FAIL: code %0d offset %0d mV, expected %0d mV", c, int'(offset) * 25, table_mv[c]);
      end
      checks++;
      if (int'(steps) != table_mv[c] / 25 + 3) begin
        failures++;
        $display("FAIL: code %0d steps %0d", c, steps);
      end
      ones = 0;
      for (int i = 0; i < 7; i++) ones += int'(seg_en[i]);
      checks++;
      if (ones != int'(steps) || (seg_en != 7'((1 << steps) - 1))) begin
        failures++;
        $display("FAIL: code %0d seg_en %b", c, seg_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
