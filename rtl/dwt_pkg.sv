// dwt_pkg: types and constants shared by the blocks of the three-octave
// systolic discrete wavelet transform (DWT-SA).
//
// The schedule repeats every SCHED_PERIOD time units (one time unit, or
// "slot", is two clock cycles: low pass in phase 0, high pass in phase 1).
// Within a period the slots run 1..8; first-octave work sits in the odd
// slots, second-octave work in slots 4 and 8, third-octave work in slot 2
// from the second period on, and slot 6 is idle. The period and the slot
// assignment follow the document's schedule; the two-phase slot is this
// design's reading of "both bands with the same hardware in one cycle".
package dwt_pkg;

  localparam int unsigned SCHED_PERIOD = 8;   // N = 8 input samples per period

  // Where the control unit's switch takes the filter operands from.
  typedef enum logic [1:0] {
    SEL_IDLE = 2'd0,   // no computation this slot
    SEL_ID   = 2'd1,   // input delay unit: first octave
    SEL_RB_C = 2'd2,   // register bank, first-octave low-pass results: second octave
    SEL_RB_E = 2'd3    // register bank, second-octave low-pass results: third octave
  } sel_t;

  // Octave tag carried with each computation (0 = none).
  typedef logic [1:0] octave_t;

endpackage
