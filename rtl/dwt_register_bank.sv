// dwt_register_bank: register bank (RB) of the systolic DWT.
//
// Holds the low-pass results that later octaves consume. Registers are
// allocated first come, first served and data only moves one way through
// them (forward register allocation): a new first-octave low-pass result c
// enters the c chain and pushes the older ones one register on; a new
// second-octave low-pass result e does the same in the e chain. A register is never reused for another
// operand while its value is still needed.
//
// Each chain is TAPS deep, so c_taps[k] and e_taps[k] are the k-th most
// recent c and e: exactly the TAPS operands one second- or third-octave
// filter computation needs. Both chains shift at the end of a time unit
// (push_c / push_e) with the filter unit's registered low-pass output, so a
// result computed in time unit t can be used from time unit t+2 on, which
// is what the control unit's schedule assumes. With TAPS = 2 (Haar) the bank
// holds 4 registers; the document's six-tap design uses 26 and this
// structure would use 12 (its own allocation, which needs no extra
// staging registers because operands are read in parallel).
// Registers clear on reset, giving zero history at start-up.
module dwt_register_bank #(
  parameter int unsigned TAPS = 2,
  parameter int unsigned DW   = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push_c,      // store din as newest c
  input  logic                 push_e,      // store din as newest e
  input  logic signed [DW-1:0] din,
  output logic signed [DW-1:0] c_taps [TAPS],
  output logic signed [DW-1:0] e_taps [TAPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) begin
        c_taps[i] <= '0;
        e_taps[i] <= '0;
      end
    end else begin
      if (push_c) begin
        c_taps[0] <= din;
        for (int i = 1; i < TAPS; i++) c_taps[i] <= c_taps[i-1];
      end
      if (push_e) begin
        e_taps[0] <= din;
        for (int i = 1; i < TAPS; i++) e_taps[i] <= e_taps[i-1];
      end
    end
  end

  // Forward allocation: a value is pushed into exactly one chain.
  assert property (@(posedge clk) disable iff (!rst_n) !(push_c && push_e))
    else $error("register bank: c and e pushed in the same cycle");

endmodule
