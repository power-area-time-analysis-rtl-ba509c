// dwt_sa_top: three-octave 1-D discrete wavelet transform, systolic array
// (DWT-SA) form, set up by default for the Haar wavelet.
//
// One filter unit of TAPS cells, each cell with a single multiplier, does
// every filtering of the pyramid algorithm: the first octave on the input
// samples a(n), the second on the first octave's low-pass output c, the
// third on the second octave's low-pass output e. The control unit
// interleaves the three octaves in a fixed 8-slot schedule so the array
// keeps pace with one input sample per time unit; the input delay unit
// supplies first-octave operands and the register bank keeps the c and e
// values later octaves need. No memory macro is used: all storage is
// registers.
//
// Interface:
//   en   0 holds the array before time unit 1 (coefficients are loaded
//        then); 1 runs it. Time unit 1 begins with the first clock edge
//        at which en is 1.
//   coef_we/coef_addr/coef_lo/coef_hi  load h_k (low pass) and g_k (high
//        pass) of tap coef_addr, 13-bit sign-magnitude (Haar: 0x0012 and
//        0x1012 for the high-pass tap 0, 0x0012 otherwise).
//   sample_in   a(n), held for a whole time unit (two clock cycles); it is
//        taken at every clock edge where sample_take is 1.
//   out_valid/out_oct/out_lo/out_hi  one low-pass and one high-pass
//        coefficient of octave out_oct (1..3), valid for a whole time unit;
//        out_coef is out_lo when band_sel = 1 and out_hi when band_sel = 0
//        (the document's band select line).
// Timing: a computation scheduled in time unit t is on the outputs during
// t+1. First-octave pairs come every 2 time units, second-octave every 4,
// third-octave every 8. Time units are numbered from 1 after reset; the
// sample present in time unit j+1 is a(j).
module dwt_sa_top
  import dwt_pkg::*;
#(
  parameter int unsigned TAPS = 2,    // Haar: two-tap filters
  parameter int unsigned IN_W = 16,
  parameter int unsigned DW   = 32,
  parameter int unsigned CW   = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    coef_we,
  input  logic [$clog2(TAPS)-1:0] coef_addr,
  input  logic [CW-1:0]           coef_lo,
  input  logic [CW-1:0]           coef_hi,
  input  logic signed [IN_W-1:0]  sample_in,
  output logic                    sample_take,
  input  logic                    band_sel,
  output logic                    out_valid,
  output octave_t                 out_oct,
  output logic signed [DW-1:0]    out_lo,
  output logic signed [DW-1:0]    out_hi,
  output logic signed [DW-1:0]    out_coef
);

  logic                   phase, issue, push_c, push_e;
  octave_t                oct;
  logic signed [IN_W-1:0] id_taps  [TAPS];
  logic signed [DW-1:0]   c_taps   [TAPS];
  logic signed [DW-1:0]   e_taps   [TAPS];
  logic signed [DW-1:0]   operands [TAPS];

  dwt_control_unit #(.TAPS(TAPS), .IN_W(IN_W), .DW(DW)) u_cu (
    .clk, .rst_n, .en,
    .phase, .sample_take,
    .slot     (),
    .sel      (),
    .issue, .oct,
    .id_taps, .c_taps, .e_taps, .operands,
    .fu_valid (out_valid),
    .fu_oct   (out_oct),
    .push_c, .push_e
  );

  dwt_input_delay #(.TAPS(TAPS), .IN_W(IN_W)) u_id (
    .clk, .rst_n,
    .shift     (sample_take),
    .sample_in (sample_in),
    .taps      (id_taps)
  );

  dwt_filter_unit #(.TAPS(TAPS), .DW(DW), .CW(CW)) u_fu (
    .clk, .rst_n,
    .coef_we, .coef_addr, .coef_lo, .coef_hi,
    .phase, .issue,
    .oct_in   (oct),
    .operands (operands),
    .out_lo, .out_hi, .out_valid, .out_oct
  );

  dwt_register_bank #(.TAPS(TAPS), .DW(DW)) u_rb (
    .clk, .rst_n,
    .push_c, .push_e,
    .din    (out_lo),
    .c_taps (c_taps),
    .e_taps (e_taps)
  );

  assign out_coef = band_sel ? out_lo : out_hi;

endmodule
