// sb_limits: turns the programmed stop band into counter bounds.
//
// A stop band SB spans F_SB_MIN..F_SB_MAX. The burst period, measured in
// CLOCK_AUX periods, lies in the band when
//     ceil(F_AUX / F_SB_MAX) <= periods <= ceil(F_AUX / F_SB_MIN)      (1)
// and the number of COMP_SKIP rising edges seen in a sampling window of
// length t_SW lies in the band when
//     t_SW * F_SB_MIN <= edges <= t_SW * F_SB_MAX                      (2)
// Since edges is an integer, (2) becomes ceil(t_SW*F_SB_MIN) <= edges <=
// floor(t_SW*F_SB_MAX). The window length in CLOCK_AUX periods is
// t_SW * F_AUX. Frequencies are given in kHz and t_SW in us, so the products
// t_SW * F are divided by 1000.
//
// The two inequalities are the design's own; their evaluation in dividers is
// this design's choice (the reference design only states that combinational
// logic derives them). The block is purely combinational. Programming with a
// zero frequency, F_SB_MIN >= F_SB_MAX or t_SW = 0 clears `valid`, which holds
// the detector idle. Results that do not fit a counter saturate.
//
// Margins: the burst period is only known to +-1 CLOCK_AUX period (the
// converter clock and CLOCK_AUX are unrelated) and the edge count of a window
// to +-1 edge, so each bound is widened by a margin: p_min - MARGIN1,
// p_max + MARGIN1, n_min - MARGIN2, n_max + MARGIN2 (never below 1). The
// reference design applies such margins without giving their size; one
// count each is this design's choice. Widening errs on the side of detecting
// a rate that is just outside the band, which is the safe side.
//
// Parameters: F_AUX_KHZ, the auxiliary clock frequency (3000 kHz by default);
// MARGIN1 and MARGIN2 in counts (1 by default).
module sb_limits
  import sbms_pkg::*;
#(
  parameter int unsigned F_AUX_KHZ = F_AUX_KHZ_DEFAULT,
  parameter int unsigned MARGIN1   = 1,
  parameter int unsigned MARGIN2   = 1
) (
  input  logic [FREQ_W-1:0] f_sb_min_khz,
  input  logic [FREQ_W-1:0] f_sb_max_khz,
  input  logic [TSW_W-1:0]  t_sw_us,
  output sb_limits_t        lim
);

  localparam int unsigned PW = 40;  // width of the intermediate products

  function automatic logic [PW-1:0] ceil_div(input logic [PW-1:0] a,
                                             input logic [PW-1:0] b);
    return (a + b - 1) / b;
  endfunction

  function automatic logic [CNT1_W-1:0] sat1(input logic [PW-1:0] v);
    return (v > PW'({CNT1_W{1'b1}})) ? {CNT1_W{1'b1}} : v[CNT1_W-1:0];
  endfunction

  function automatic logic [CNT2_W-1:0] sat2(input logic [PW-1:0] v);
    return (v > PW'({CNT2_W{1'b1}})) ? {CNT2_W{1'b1}} : v[CNT2_W-1:0];
  endfunction

  function automatic logic [TIMER_W-1:0] satt(input logic [PW-1:0] v);
    return (v > PW'({TIMER_W{1'b1}})) ? {TIMER_W{1'b1}} : v[TIMER_W-1:0];
  endfunction

  // lower bound less the margin, kept at 1 or more
  function automatic logic [PW-1:0] widen_down(input logic [PW-1:0] v, input int unsigned m);
    return (v > PW'(m) + 1) ? v - PW'(m) : PW'(1);
  endfunction

  logic [PW-1:0] fmin, fmax, tsw, faux;
  logic [PW-1:0] fmin_nz, fmax_nz;

  always_comb begin
    fmin    = PW'(f_sb_min_khz);
    fmax    = PW'(f_sb_max_khz);
    tsw     = PW'(t_sw_us);
    faux    = PW'(F_AUX_KHZ);
    // keep the dividers defined for an unprogrammed (zero) band
    fmin_nz = (fmin == '0) ? PW'(1) : fmin;
    fmax_nz = (fmax == '0) ? PW'(1) : fmax;

    lim.p_min       = sat1(widen_down(ceil_div(faux, fmax_nz), MARGIN1));
    lim.p_max       = sat1(ceil_div(faux, fmin_nz) + PW'(MARGIN1));
    lim.n_min       = sat2(widen_down(ceil_div(tsw * fmin, PW'(1000)), MARGIN2));
    lim.n_max       = sat2((tsw * fmax) / PW'(1000) + PW'(MARGIN2));
    lim.t_sw_cycles = satt((tsw * faux) / PW'(1000));
    lim.valid       = (fmin != '0) && (fmin < fmax) && (tsw != '0);
  end

endmodule
