// dwt_input_delay: input delay unit (ID) of the systolic DWT.
//
// A chain of TAPS-1 registers. At the end of every time unit (shift = 1)
// each register passes its content to its right neighbour and the first one
// takes the present input sample, so the chain holds the TAPS-1 previous
// samples. The present sample itself is passed straight to the switch as
// tap 0, as the document shows the delay line's input also feeding the switch.
// taps[k] is therefore a(n-k) during the time unit in which a(n) is applied.
// The document's six-tap filter uses five delays; the Haar default (two taps)
// uses one. Registers clear on reset (reset value is this design's choice),
// so the first computation sees zero history.
module dwt_input_delay #(
  parameter int unsigned TAPS = 2,    // filter length
  parameter int unsigned IN_W = 16    // input sample width, two's complement
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   shift,               // end of time unit
  input  logic signed [IN_W-1:0] sample_in,           // present sample a(n)
  output logic signed [IN_W-1:0] taps [TAPS]          // taps[k] = a(n-k)
);

  logic signed [IN_W-1:0] dly [TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS-1; i++) dly[i] <= '0;
    end else if (shift) begin
      dly[0] <= sample_in;
      for (int i = 1; i < TAPS-1; i++) dly[i] <= dly[i-1];
    end
  end

  always_comb begin
    taps[0] = sample_in;
    for (int k = 1; k < TAPS; k++) taps[k] = dly[k-1];
  end

endmodule
