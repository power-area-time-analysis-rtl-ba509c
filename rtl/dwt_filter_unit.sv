// dwt_filter_unit: filter unit (FU) of the systolic DWT.
//
// TAPS filter cells form the FIR filter of Eq. 1a/1b,
//   y = c_0 x_0 + c_1 x_1 + ... + c_{TAPS-1} x_{TAPS-1},
// where x_k is the k-th operand the control unit's switch supplies (for the
// first octave x_k = a(n-k)) and c_k is h_k (low pass) or g_k (high pass).
// Cell TAPS-1 starts from a zero partial result, each cell adds its product
// and hands the partial result to the next cell towards cell 0, whose output
// is the coefficient.
//
// A time unit is two clock cycles. In phase 0 every cell uses its low-pass
// coefficient and the sum is caught in an internal register; in phase 1 the
// same multipliers and adders use the high-pass coefficients, and at the end
// of phase 1 both results, with the octave tag, go to the output registers.
// A computation issued in time unit t is therefore on the outputs for the
// whole of time unit t+1: the latency is one time unit, as the document's
// schedule requires, and one low-pass plus one high-pass coefficient leave
// per time unit. Passing the partial results between cells within the time
// unit, instead of through a register per cell, is this design's choice: it
// keeps the one-time-unit latency the schedule depends on.
//
// Coefficients: coef_we writes coef_lo/coef_hi into cell coef_addr.
module dwt_filter_unit
  import dwt_pkg::*;
#(
  parameter int unsigned TAPS = 2,
  parameter int unsigned DW   = 32,
  parameter int unsigned CW   = 13
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        coef_we,
  input  logic [$clog2(TAPS)-1:0]     coef_addr,
  input  logic [CW-1:0]               coef_lo,
  input  logic [CW-1:0]               coef_hi,
  input  logic                        phase,        // 0: low pass, 1: high pass (end of time unit)
  input  logic                        issue,        // a computation runs this time unit
  input  octave_t                     oct_in,
  input  logic signed [DW-1:0]        operands [TAPS],
  output logic signed [DW-1:0]        out_lo,
  output logic signed [DW-1:0]        out_hi,
  output logic                        out_valid,
  output octave_t                     out_oct
);

  logic signed [DW-1:0] partial [TAPS+1];
  assign partial[TAPS] = '0;

  for (genvar k = 0; k < TAPS; k++) begin : g_cell
    dwt_filter_cell #(.DW(DW), .CW(CW)) u_cell (
      .clk         (clk),
      .rst_n       (rst_n),
      .coef_we     (coef_we && (coef_addr == k)),
      .coef_lo_in  (coef_lo),
      .coef_hi_in  (coef_hi),
      .band_hi     (phase),
      .operand     (operands[k]),
      .partial_in  (partial[k+1]),
      .partial_out (partial[k])
    );
  end

  logic signed [DW-1:0] lo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q      <= '0;
      out_lo    <= '0;
      out_hi    <= '0;
      out_valid <= 1'b0;
      out_oct   <= '0;
    end else if (!phase) begin
      lo_q <= partial[0];
    end else begin
      out_valid <= issue;
      out_oct   <= issue ? oct_in : '0;
      if (issue) begin
        out_lo <= lo_q;
        out_hi <= partial[0];
      end
    end
  end

endmodule
