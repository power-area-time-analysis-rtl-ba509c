// tb_dwt_sa_top_6tap: end-to-end test of the three-octave systolic DWT built
// with six-tap filters (the general filter length of Eq. 1a/1b, e.g. db3).
//
// A reference model in the testbench runs the pyramid algorithm directly:
//   c(2m) = sum_k h_k a(2m-k),        b(2m) = sum_k g_k a(2m-k)
//   e(4m) = sum_k h_k c(4m-2k),       d(4m) = sum_k g_k c(4m-2k)
//   g(8m+4) = sum_k h_k e(8m+4-4k),   f(8m+4) = sum_k g_k e(8m+4-4k)
// with zero for samples before time 0 and 32-bit wrap-around arithmetic, and
// places each result in the time unit the schedule assigns it (first octave
// in odd slots, second in slots 4 and 8, third in slot 2 from time unit 10
// on, output one time unit later). Every time unit the outputs are compared
// with the model, including whether anything is valid at all.
// The run uses random coefficients, random samples and a random band select,
// and the steady-state utilisation must be 7 busy time units in 8.
module tb_dwt_sa_top_6tap;
  import dwt_pkg::*;

  localparam int TAPS = 6;
  localparam int IN_W = 16;
  localparam int DW   = 32;
  localparam int CW   = 13;
  localparam int NTU  = 400;

  logic clk = 1'b0;
  logic rst_n, en, coef_we, band_sel, sample_take, out_valid;
  logic [$clog2(TAPS)-1:0] coef_addr;
  logic [CW-1:0] coef_lo, coef_hi;
  logic signed [IN_W-1:0] sample_in;
  octave_t out_oct;
  logic signed [DW-1:0] out_lo, out_hi, out_coef;

  dwt_sa_top #(.TAPS(TAPS)) dut (
    .clk, .rst_n, .en, .coef_we, .coef_addr, .coef_lo, .coef_hi,
    .sample_in, .sample_take, .band_sel,
    .out_valid, .out_oct, .out_lo, .out_hi, .out_coef
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_oct[4];            // outputs seen per octave (0: idle time units)
  int n_idle_start = 0, n_idle_steady = 0, n_band[2];
  int n_busy, n_span;      // steady-state utilisation, per run

  int h[TAPS], g[TAPS];
  int a[NTU+1];
  int cm[NTU], em[NTU];     // model: c(2i) and e(4p)
  int cycles;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  function automatic logic [CW-1:0] to_sm(int v);
    int m = (v < 0) ? -v : v;
    return {v < 0 ? 1'b1 : 1'b0, m[CW-2:0]};
  endfunction

  function automatic int geta(int j);
    return (j < 0) ? 0 : a[j];
  endfunction
  function automatic int getc(int i);
    return (i < 0) ? 0 : cm[i];
  endfunction
  function automatic int gete(int p);
    return (p < 0) ? 0 : em[p];
  endfunction

  // Expected result of time unit t: octave (0 = idle), low, high.
  task automatic model(input int t, output int o, output int lo, output int hi);
    int m;
    lo = 0; hi = 0; o = 0;
    if (t % 2 == 1) begin
      m = (t - 1) / 2; o = 1;
      for (int k = 0; k < TAPS; k++) begin
        lo += h[k] * geta(2*m - k); hi += g[k] * geta(2*m - k);
      end
      cm[m] = lo;
    end else if (t % 4 == 0) begin
      m = t / 4 - 1; o = 2;
      for (int k = 0; k < TAPS; k++) begin
        lo += h[k] * getc(2*m - k); hi += g[k] * getc(2*m - k);
      end
      em[m] = lo;
    end else if (t % 8 == 2 && t >= 10) begin
      m = (t - 10) / 8; o = 3;
      for (int k = 0; k < TAPS; k++) begin
        lo += h[k] * gete(2*m + 1 - k); hi += g[k] * gete(2*m + 1 - k);
      end
    end
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // One run of ntu time units. Samples must be in a[], coefficients in h/g.
  task automatic run(input int ntu);
    int o, lo, hi, eo, elo, ehi;
    n_busy = 0; n_span = 0;
    rst_n = 1'b0; en = 1'b0; coef_we = 1'b0; coef_addr = '0;
    coef_lo = '0; coef_hi = '0; sample_in = '0; band_sel = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < TAPS; k++) begin
      coef_we = 1'b1; coef_addr = k[$clog2(TAPS)-1:0];
      coef_lo = to_sm(h[k]); coef_hi = to_sm(g[k]);
      @(negedge clk);
    end
    coef_we = 1'b0;
    en = 1'b1;
    cycles = 0;
    for (int t = 1; t <= ntu + 1; t++) begin
      // phase 0 of time unit t: outputs show time unit t-1
      sample_in = IN_W'(a[t-1]);
      band_sel  = 1'($urandom);
      #1;
      if (t > 1) begin
        model(t - 1, eo, elo, ehi);
        check(out_valid == (eo != 0), $sformatf("tu %0d valid %0b", t-1, out_valid));
        if (t - 1 >= 9 && t - 1 <= 8 * (ntu / 8)) begin
          n_span++;
          if (out_valid) n_busy++;
        end
        if (eo == 0) begin
          n_oct[0]++;
          if (t - 1 == 2) n_idle_start++;
          if ((t - 1) % 8 == 6) n_idle_steady++;
        end else begin
          n_oct[eo]++;
          check(out_oct == octave_t'(eo), $sformatf("tu %0d oct %0d exp %0d", t-1, out_oct, eo));
          check(out_lo == elo, $sformatf("tu %0d lo %0h exp %0h", t-1, out_lo, elo));
          check(out_hi == ehi, $sformatf("tu %0d hi %0h exp %0h", t-1, out_hi, ehi));
          check(out_coef == (band_sel ? elo : ehi), $sformatf("tu %0d band", t-1));
          n_band[band_sel]++;
          // first third-octave result: scheduled in time unit 10, out in 11
          if (eo == 3 && t - 1 == 10)
            check(cycles == 20, $sformatf("latency of third octave, %0d cycles", cycles));
        end
      end
      @(negedge clk);
      check(sample_take == 1'b1, "sample taken at end of time unit");
      @(negedge clk);
    end
    // 7 of every 8 time units carry a computation once the third octave runs
    check(n_span > 0 && n_busy * 8 == n_span * 7,
          $sformatf("utilisation %0d of %0d time units", n_busy, n_span));
  endtask

  initial begin
    // Run 2: random coefficients and samples.
    for (int k = 0; k < TAPS; k++) begin
      h[k] = int'($urandom_range(0, 4095)) - 2048;
      g[k] = int'($urandom_range(0, 4095)) - 2048;
    end
    for (int j = 0; j <= NTU; j++) a[j] = int'($urandom_range(0, 65535)) - 32768;
    run(NTU);

    check(n_oct[1] > 0, "first octave happened");
    check(n_oct[2] > 0, "second octave happened");
    check(n_oct[3] > 0, "third octave happened");
    check(n_idle_start > 0, "start-up idle slot happened");
    check(n_idle_steady > 0, "steady idle slot happened");
    check(n_band[0] > 0 && n_band[1] > 0, "both band selects used");
    $display("octave outputs: %0d %0d %0d, idle %0d (start-up %0d, slot 6 %0d), band 0/1 %0d/%0d",
             n_oct[1], n_oct[2], n_oct[3], n_oct[0], n_idle_start, n_idle_steady, n_band[0], n_band[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
