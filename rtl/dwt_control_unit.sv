// dwt_control_unit: control unit (CU) of the systolic DWT, with its switch.
//
// The CU decides, for every time unit, which octave the filter unit works
// on and switches the matching operands to it:
//   slots 1, 3, 5, 7 (every second time unit)  first octave, operands from
//                                              the input delay unit
//   slots 4, 8       (every fourth)            second octave, operands from
//                                              the register bank's c chain
//   slot 2 of periods 2, 3, ... (every eighth) third octave, operands from
//                                              the register bank's e chain
//   slot 6, and slot 2 of the first period     idle
// This is the document's schedule for N = 8 (first octave every N/4, second
// every N/2, third every N time units, the third at 8k+10), so 7 of every 8
// time units carry a computation. The document also says cycle kN+2 is idle
// in every period; that cannot hold together with third-octave work at
// 8k+10, and the design follows the 8k+10 schedule.
//
// It is built from small state machines: a phase machine (low-pass phase,
// high-pass phase) that makes a time unit two clock cycles, a modulo-8 slot
// counter, and a start-up machine that keeps slot 2 idle until third-octave
// operands exist; a decoder turns slot and start-up state into the switch
// selection. The CU also tells the register bank when to store a low-pass
// result: a first-octave one into the c chain, a second-octave one into the
// e chain, at the end of the time unit after it was computed.
//
// en = 0 freezes the CU in phase 0 of slot 1 (and with it the input delay
// unit and register bank, which only move at the end of a time unit); this
// lets coefficients be loaded after reset before any computation starts.
//
// Timing: slot and sel change only at the end of a time unit (phase = 1 at
// a clock edge), so operands stay put for both phases. The input sample is
// taken at every end of a time unit (sample_take).
module dwt_control_unit
  import dwt_pkg::*;
#(
  parameter int unsigned TAPS = 2,
  parameter int unsigned IN_W = 16,
  parameter int unsigned DW   = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,           // 0 holds the schedule before time unit 1
  // schedule
  output logic                   phase,        // 0: low pass, 1: high pass
  output logic                   sample_take,  // input sample consumed at this edge
  output logic [2:0]             slot,         // slot within the period, 0..7 = slots 1..8
  output sel_t                   sel,
  output logic                   issue,
  output octave_t                oct,
  // switch
  input  logic signed [IN_W-1:0] id_taps [TAPS],
  input  logic signed [DW-1:0]   c_taps  [TAPS],
  input  logic signed [DW-1:0]   e_taps  [TAPS],
  output logic signed [DW-1:0]   operands [TAPS],
  // register-bank control
  input  logic                   fu_valid,
  input  octave_t                fu_oct,
  output logic                   push_c,
  output logic                   push_e
);

  typedef enum logic { PH_LO = 1'b0, PH_HI = 1'b1 } phase_t;
  typedef enum logic { ST_FIRST = 1'b0, ST_RUN = 1'b1 } start_t;

  phase_t     phase_q;
  start_t     start_q;
  logic [2:0] slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= PH_LO;
      slot_q  <= 3'd0;
      start_q <= ST_FIRST;
    end else if (en) begin
      phase_q <= (phase_q == PH_LO) ? PH_HI : PH_LO;
      if (phase_q == PH_HI) begin
        slot_q <= slot_q + 3'd1;
        if (slot_q == 3'(SCHED_PERIOD - 1)) start_q <= ST_RUN;
      end
    end
  end

  // Decoder: slot (1-based) = slot_q + 1.
  always_comb begin
    sel = SEL_IDLE;
    oct = 2'd0;
    if (!slot_q[0]) begin                       // slots 1, 3, 5, 7
      sel = SEL_ID;   oct = 2'd1;
    end else if (slot_q[1:0] == 2'b11) begin    // slots 4, 8
      sel = SEL_RB_C; oct = 2'd2;
    end else if (slot_q == 3'd1 && start_q == ST_RUN) begin   // slot 2, 8k+10
      sel = SEL_RB_E; oct = 2'd3;
    end
  end

  assign issue       = (sel != SEL_IDLE);
  assign phase       = (phase_q == PH_HI);   // PH_HI is only reached with en = 1
  assign sample_take = phase;
  assign slot        = slot_q;

  // Switch.
  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      unique case (sel)
        SEL_ID:   operands[k] = DW'(id_taps[k]);
        SEL_RB_C: operands[k] = c_taps[k];
        SEL_RB_E: operands[k] = e_taps[k];
        default:  operands[k] = '0;
      endcase
    end
  end

  assign push_c = phase && fu_valid && (fu_oct == 2'd1);
  assign push_e = phase && fu_valid && (fu_oct == 2'd2);

endmodule
