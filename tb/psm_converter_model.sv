// psm_converter_model: behavioural stand-in for a DC-DC converter regulating
// a light load in pulse-skip mode, as seen by the stop-band management
// system. Not synthesizable; used by testbenches only.
//
// The converter clock runs with period TS_NS. A burst is K switching cycles
// with the skip comparator output high, followed by idle cycles; the burst
// repeats every `len` converter cycles, so F_SKIP = 1 / (len * TS_NS). The
// energy of one burst grows with the square of the coil peak current, which
// the skip reference sets, so at constant load the burst period scales with
// (ref_skip / ref_nominal)^2:  len = round(base_len * (ref_skip/ref_nominal)^2)
// when follow_ref is set (otherwise len = base_len). `gap_every` > 0 makes
// every gap_every-th burst twice as long, which models a disturbed converter
// whose average rate differs from its instantaneous one. The length is
// recomputed at the start of every burst.
module psm_converter_model #(
  parameter real TS_NS       = 666.0,
  parameter int  K           = 3,
  parameter real REF_NOMINAL = 0.575
) (
  input  real  ref_skip,
  input  int   base_len,
  input  bit   follow_ref,
  input  int   gap_every,
  input  bit   run,
  output logic comp_skip,
  output int   cur_len
);
  timeunit 1ns; timeprecision 1ps;

  initial begin
    int pos, nburst;
    real ratio;
    pos = 0;
    nburst = 0;
    comp_skip = 0;
    cur_len = base_len;
    forever begin
      #(TS_NS);
      if (!run) begin
        comp_skip = 0;
        pos = 0;
      end else begin
        if (pos == 0) begin
          ratio = ref_skip / REF_NOMINAL;
          cur_len = follow_ref ? int'(base_len * ratio * ratio) : base_len;
          nburst++;
          if (gap_every > 0 && (nburst % gap_every) == 0) cur_len = 2 * cur_len;
          if (cur_len <= K) cur_len = K + 1;
        end
        comp_skip = (pos < K);
        pos++;
        if (pos >= cur_len) pos = 0;
      end
    end
  end
endmodule
