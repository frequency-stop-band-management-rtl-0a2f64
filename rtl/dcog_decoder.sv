// dcog_decoder: decoder of the digitally-controlled offset generator.
//
// COUNTER_REF selects the offset V_OFFSET of the corrective action in unit
// steps: code 0 gives no offset, codes 1..2^(N-1) give +1..+2^(N-1) steps and
// the remaining codes give -1, -2, ... steps (N = 3: 0, +1, +2, +3, +4, -1,
// -2, -3, i.e. 0, +25, ..., +100, -25, ..., -75 mV with 25 mV steps). The
// analog level shifter can only add a positive offset, so a baseline of
// 2^N - 1 - 2^(N-1) steps (3 for N = 3) is added: the programmable resistor
// R_OFFSET is set to `steps` = offset + baseline unit segments (0..2^N-1).
//
// Outputs: offset (signed, in steps), steps (unsigned unit-resistor count) and
// seg_en, a thermometer code with one bit per unit segment of R_OFFSET
// (seg_en[i] = 1 puts segment i in the current path). The offset sequence
// and the baseline follow the reference design; the thermometer-coded
// resistor string is this design's choice. Purely combinational.
module dcog_decoder
  import sbms_pkg::*;
#(
  parameter int unsigned N = REF_N_DEFAULT
) (
  input  logic [N-1:0]          code,
  output logic signed [N:0]     offset,
  output logic [N-1:0]          steps,
  output logic [(2**N)-2:0]     seg_en
);

  localparam int unsigned NUM_POS  = 2 ** (N - 1);
  localparam int unsigned BASELINE = (2 ** N) - 1 - NUM_POS;

  always_comb begin
    if (code == '0)
      offset = '0;
    else if ({1'b0, code} <= (N + 1)'(NUM_POS))
      offset = $signed({1'b0, code});
    else
      offset = -$signed({1'b0, code} - (N + 1)'(NUM_POS));
    steps = N'(offset + $signed((N + 1)'(BASELINE)));
    for (int i = 0; i < (2 ** N) - 1; i++)
      seg_en[i] = (i < int'(steps));
  end

endmodule
