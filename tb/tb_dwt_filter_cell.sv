// tb_dwt_filter_cell: checks one filter cell. Random sign-magnitude
// coefficient pairs are loaded, then random operands and partial results are
// applied in both bands; the output must be partial_in + operand * coefficient
// in 32-bit two's complement, worked out here with plain signed arithmetic.
// Directed cases cover a zero coefficient with the sign bit set, the most
// negative operand and operands of both signs against both coefficient signs.
module tb_dwt_filter_cell;
  localparam int DW = 32;
  localparam int CW = 13;

  logic clk = 1'b0, rst_n, coef_we, band_hi;
  logic [CW-1:0] coef_lo_in, coef_hi_in;
  logic signed [DW-1:0] operand, partial_in, partial_out;

  dwt_filter_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hv, gv;
  int sign_cases[4];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW-1:0] to_sm(int v, bit neg_zero = 0);
    int m = (v < 0) ? -v : v;
    return {(v < 0 || neg_zero) ? 1'b1 : 1'b0, m[CW-2:0]};
  endfunction

  task automatic load(int l, int hh, bit nz = 0);
    hv = l; gv = hh;
    coef_we = 1'b1; coef_lo_in = to_sm(l, nz); coef_hi_in = to_sm(hh, nz);
    @(negedge clk);
    coef_we = 1'b0; coef_lo_in = '0; coef_hi_in = '0;
  endtask

  task automatic try(int op, int p);
    int exp_v;
    operand = op; partial_in = p;
    for (int b = 0; b < 2; b++) begin
      band_hi = b[0];
      #1;
      exp_v = p + op * (b ? gv : hv);
      checks++;
      if (partial_out != exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d coef %0d p %0d: %0d exp %0d",
                                    op, b ? gv : hv, p, partial_out, exp_v);
      end
      sign_cases[{op < 0, (b ? gv : hv) < 0}]++;
    end
  endtask

  initial begin
    rst_n = 1'b0; coef_we = 1'b0; band_hi = 1'b0; operand = '0; partial_in = '0;
    coef_lo_in = '0; coef_hi_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load(18, -18);                      // Haar
    try(1, 0); try(-1, 0); try(36, 100); try(-32768, 5);
    try(int'(32'h8000_0000), 0);
    load(0, 0, 1);                      // -0 coefficients
    try(1234, 7); try(-1234, 7);
    for (int i = 0; i < 200; i++) begin
      load(int'($urandom_range(0, 8190)) - 4095, int'($urandom_range(0, 8190)) - 4095);
      repeat (10) try(int'($urandom), int'($urandom));
    end
    foreach (sign_cases[i]) begin checks++; if (sign_cases[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
