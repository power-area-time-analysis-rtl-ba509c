// tb_dwt_filter_unit: checks the filter unit at two and six taps.
// Random coefficients are loaded cell by cell; then, time unit after time
// unit (two clock cycles, phase 0 then phase 1), random operand vectors with
// a random issue flag and octave tag are applied. During the next time unit
// the outputs must hold sum_k h_k x_k and sum_k g_k x_k of the previous one,
// its tag and valid flag, and keep their old values after an idle time unit.
module tb_dwt_filter_unit;
  import dwt_pkg::*;
  localparam int DW = 32;
  localparam int CW = 13;

  logic clk = 1'b0;
  logic rst_n, coef_we, phase, issue;
  logic [2:0] coef_addr;
  logic [CW-1:0] coef_lo, coef_hi;
  octave_t oct_in;
  logic signed [DW-1:0] ops [6];
  logic signed [DW-1:0] ops2 [2];
  logic signed [DW-1:0] lo2, hi2, lo6, hi6;
  logic v2, v6;
  octave_t o2, o6;

  assign ops2[0] = ops[0];
  assign ops2[1] = ops[1];

  dwt_filter_unit dut2 (.clk, .rst_n, .coef_we(coef_we && coef_addr < 2), .coef_addr(coef_addr[0]),
    .coef_lo, .coef_hi, .phase, .issue, .oct_in, .operands(ops2),
    .out_lo(lo2), .out_hi(hi2), .out_valid(v2), .out_oct(o2));
  dwt_filter_unit #(.TAPS(6)) dut6 (.clk, .rst_n, .coef_we, .coef_addr,
    .coef_lo, .coef_hi, .phase, .issue, .oct_in, .operands(ops),
    .out_lo(lo6), .out_hi(hi6), .out_valid(v6), .out_oct(o6));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_issue = 0, n_idle = 0;
  int h[6], g[6];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [CW-1:0] to_sm(int v);
    int m = (v < 0) ? -v : v;
    return {v < 0 ? 1'b1 : 1'b0, m[CW-2:0]};
  endfunction

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    int e2l, e2h, e6l, e6h;
    bit  pv;
    octave_t po;
    rst_n = 1'b0; coef_we = 1'b0; phase = 1'b0; issue = 1'b0; oct_in = '0;
    coef_addr = '0; coef_lo = '0; coef_hi = '0;
    foreach (ops[k]) ops[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      h[k] = int'($urandom_range(0, 8190)) - 4095;
      g[k] = int'($urandom_range(0, 8190)) - 4095;
      coef_we = 1'b1; coef_addr = 3'(k); coef_lo = to_sm(h[k]); coef_hi = to_sm(g[k]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    e2l = 0; e2h = 0; e6l = 0; e6h = 0; pv = 0; po = '0;
    for (int t = 0; t < 600; t++) begin
      // phase 0
      phase = 1'b0;
      issue = 1'($urandom);
      oct_in = octave_t'($urandom_range(1, 3));
      foreach (ops[k]) ops[k] = int'($urandom);
      #1;
      if (t > 0) begin
        chk(v2 == pv && v6 == pv, $sformatf("t %0d valid", t));
        chk(o2 == (pv ? po : '0) && o6 == (pv ? po : '0), $sformatf("t %0d oct", t));
        chk(lo2 == e2l && hi2 == e2h, $sformatf("t %0d 2-tap %0d/%0d exp %0d/%0d", t, lo2, hi2, e2l, e2h));
        chk(lo6 == e6l && hi6 == e6h, $sformatf("t %0d 6-tap", t));
      end
      @(negedge clk);
      phase = 1'b1;
      #1;
      // outputs must still hold during phase 1
      chk(lo6 == e6l && hi6 == e6h && v6 == pv, $sformatf("t %0d hold in phase 1", t));
      @(negedge clk);
      pv = issue; po = oct_in;
      if (issue) begin
        n_issue++;
        e2l = 0; e2h = 0; e6l = 0; e6h = 0;
        for (int k = 0; k < 6; k++) begin
          if (k < 2) begin e2l += h[k] * ops[k]; e2h += g[k] * ops[k]; end
          e6l += h[k] * ops[k]; e6h += g[k] * ops[k];
        end
      end else n_idle++;
    end
    chk(n_issue > 0 && n_idle > 0, "issue and idle both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
