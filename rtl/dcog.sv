// dcog: digitally-controlled offset generator (behavioural model of an
// analog block, not synthesizable).
//
// The real block is a CMOS source follower biased by I_B, which decouples its
// input, followed by a programmable resistor R_OFFSET through which a constant
// current I_OFFSET (< I_B) flows towards the follower's source, so
//     OUT = IN - V_GS + R_OFFSET * I_OFFSET.
// A decoder (dcog_decoder) turns the COUNTER_REF code into the number of
// unit segments of R_OFFSET. Two identical instances are used: one shifts
// the fixed skip reference V_FIXED into REF_SKIP, the other shifts the error
// amplifier output V_EA into the control voltage V_C, so that V_C follows
// REF_SKIP and the output voltage is not disturbed by a correction.
//
// Ports: in_v (V), code (N bits), out_v (V); `steps` is the decoded segment
// count. The model is static: out_v follows in_v and code at once.
// Parameters V_GS, R_UNIT and I_OFFSET are assumed values (the design gives
// only the circuit); their default product R_UNIT * I_OFFSET is the 25 mV
// offset step of the reference design.
module dcog
  import sbms_pkg::*;
#(
  parameter int unsigned N        = REF_N_DEFAULT,
  parameter real         V_GS     = 0.6,     // follower gate-source drop, V
  parameter real         R_UNIT   = 2500.0,  // one R_OFFSET segment, ohm
  parameter real         I_OFFSET = 10.0e-6  // offset bias current, A
) (
  input  real          in_v,
  input  logic [N-1:0] code,
  output real          out_v,
  output logic [N-1:0] steps
);

  logic signed [N:0]    offset;
  logic [(2**N)-2:0]    seg_en;
  real                  r_offset;

  dcog_decoder #(.N(N)) u_dec (
    .code   (code),
    .offset (offset),
    .steps  (steps),
    .seg_en (seg_en)
  );

  // resistance of the segments put in the path by the thermometer code
  always_comb begin
    r_offset = 0.0;
    for (int i = 0; i < (2 ** N) - 1; i++)
      if (seg_en[i]) r_offset = r_offset + R_UNIT;
  end

  assign out_v = in_v - V_GS + r_offset * I_OFFSET;

  logic unused;
  assign unused = ^offset;

endmodule
