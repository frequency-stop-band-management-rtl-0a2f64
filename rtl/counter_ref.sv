// counter_ref: COUNTER_REF, the iteration counter of the corrective action.
//
// Each rising edge of the SB flag means "the converter is still steadily
// inside the stop band", and advances the counter by one. The counter value
// selects the offset added to the skip reference REF_SKIP and to the error
// amplifier output (see dcog_decoder). From its reset value 0 (no offset) it
// counts 1, 2, ..., 2^N-1 and then rolls over to 1, never back to 0, so a
// converter that falls back into a band later is pushed through the whole
// sequence of offsets again.
//
// Interface: clk (CLOCK_AUX), rst_n, sb; code (N bits). Timing: code changes
// on the clock edge after the one at which SB is first seen high. The
// counter is synchronous to CLOCK_AUX with an edge detector on SB (in the
// reference schematic SB clocks the counter directly); N = 3 gives the seven
// offsets of the reference design.
module counter_ref
  import sbms_pkg::*;
#(
  parameter int unsigned N = REF_N_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sb,
  output logic [N-1:0] code
);

  logic sb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sb_q <= 1'b0;
      code <= '0;
    end else begin
      sb_q <= sb;
      if (sb && !sb_q)
        code <= (code == '1) ? N'(1) : code + 1'b1;
    end
  end

  // once left, the default code 0 is never re-entered
  a_no_zero: assert property (@(posedge clk) disable iff (!rst_n)
    (code != '0) |=> (code != '0));

endmodule
