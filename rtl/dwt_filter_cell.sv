// dwt_filter_cell: one filter cell (FC) of the systolic DWT filter unit.
//
// The cell owns one multiplier and one adder, shared by the two bands, and
// two coefficient registers: one low-pass (h_k) and one high-pass (g_k)
// coefficient. band_hi picks which coefficient the multiplier uses, so the
// cell serves the low pass in one phase of a time unit and the high pass in
// the other. The cell adds its product to the partial result handed over by
// its neighbour and hands the new partial result on.
//
// Signed operands are handled as in the document: the multiplier itself is
// unsigned. A negative data operand is inverted (two's complement magnitude),
// the product's sign is the xor of the two operand signs, and a negative
// product is inverted back before the adder. Coefficients are stored in
// sign-magnitude form with the sign in bit CW-1 (the document lists the Haar
// coefficients as 0012 and 1012, which this design reads as +18 and -18 in
// a 13-bit sign-magnitude word). Products are truncated to DW bits.
//
// Interface: coefficients load on coef_we at a clock edge; partial_out is
// combinational from operand, partial_in and band_hi.
module dwt_filter_cell #(
  parameter int unsigned DW = 32,   // data / partial-result width
  parameter int unsigned CW = 13    // coefficient width, sign-magnitude
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 coef_we,
  input  logic [CW-1:0]        coef_lo_in,   // h_k
  input  logic [CW-1:0]        coef_hi_in,   // g_k
  input  logic                 band_hi,      // 0: low pass, 1: high pass
  input  logic signed [DW-1:0] operand,
  input  logic signed [DW-1:0] partial_in,
  output logic signed [DW-1:0] partial_out
);

  logic [CW-1:0] coef_lo_q, coef_hi_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef_lo_q <= '0;
      coef_hi_q <= '0;
    end else if (coef_we) begin
      coef_lo_q <= coef_lo_in;
      coef_hi_q <= coef_hi_in;
    end
  end

  logic [CW-1:0] coef;
  logic          op_neg, prod_neg;
  logic [DW-1:0] op_mag, prod_mag, prod;

  always_comb begin
    coef     = band_hi ? coef_hi_q : coef_lo_q;
    op_neg   = operand[DW-1];
    op_mag   = op_neg ? (~operand + 1'b1) : operand;                 // invert
    prod_mag = DW'(op_mag * {{(DW-CW+1){1'b0}}, coef[CW-2:0]});      // unsigned multiply
    prod_neg = op_neg ^ coef[CW-1];                                  // xor of signs
    prod     = prod_neg ? (~prod_mag + 1'b1) : prod_mag;
    partial_out = partial_in + $signed(prod);
  end

endmodule
