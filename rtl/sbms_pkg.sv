// sbms_pkg: types and sizes shared by the stop-band management system (SBMS).
//
// The SBMS watches the skip comparator of a peak-current-mode DC-DC converter
// running in pulse-skip mode (PSM), decides whether the burst repetition rate
// F_SKIP sits steadily inside a forbidden frequency band, and if so steps an
// offset added to the skip reference until the converter leaves the band.
//
// This package holds the state encodings of the two detection state machines
// (numbered as in the state-flow diagrams of the design: AFSM1 states 1..6,
// AFSM2 states 1..4) and the default widths of the programming words and
// counters. The widths are this design's choice; they cover stop bands down
// to 1 kHz and sampling windows up to 2047 us with a 3 MHz auxiliary clock.
package sbms_pkg;

  // Programming word widths
  localparam int unsigned FREQ_W  = 16;  // stop-band edges, in kHz
  localparam int unsigned TSW_W   = 11;  // sampling window, in us

  // Counter widths (all counters saturate instead of wrapping)
  localparam int unsigned CNT1_W  = 16;  // COUNTER1: CLOCK_AUX periods per burst period
  localparam int unsigned CNT2_W  = 16;  // COUNTER2: COMP_SKIP rising edges per window
  localparam int unsigned TIMER_W = 16;  // sampling-window timer, CLOCK_AUX periods

  // Default auxiliary clock frequency in kHz (3 MHz clock of the reference design)
  localparam int unsigned F_AUX_KHZ_DEFAULT = 3000;

  // Width of COUNTER_REF (N in the schematic): 3 bits give the 7 offset steps
  localparam int unsigned REF_N_DEFAULT = 3;

  // AFSM1: burst-period check (condition (1))
  typedef enum logic [2:0] {
    A1_INITIAL    = 3'd1,
    A1_EN_COUNTER = 3'd2,
    A1_WAIT       = 3'd3,
    A1_NOT_IN_SB  = 3'd4,
    A1_WAIT_SKIP0 = 3'd5,
    A1_WAIT_SKIP1 = 3'd6
  } afsm1_state_t;

  // AFSM2: sampling-window check (condition (2))
  typedef enum logic [2:0] {
    A2_INITIAL     = 3'd1,
    A2_EN_COUNTING = 3'd2,
    A2_SB_DETECTED = 3'd3,
    A2_NOT_IN_SB   = 3'd4
  } afsm2_state_t;

  // Bounds derived from the programmed stop band (see sb_limits)
  typedef struct packed {
    logic [CNT1_W-1:0]  p_min;        // ceil(F_AUX / F_SB_MAX)
    logic [CNT1_W-1:0]  p_max;        // ceil(F_AUX / F_SB_MIN)
    logic [CNT2_W-1:0]  n_min;        // ceil(t_SW * F_SB_MIN)
    logic [CNT2_W-1:0]  n_max;        // floor(t_SW * F_SB_MAX)
    logic [TIMER_W-1:0] t_sw_cycles;  // t_SW * F_AUX
    logic               valid;        // programming is usable
  } sb_limits_t;

endpackage
