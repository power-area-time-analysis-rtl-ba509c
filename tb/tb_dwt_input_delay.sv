// tb_dwt_input_delay: checks the input delay unit at two and six taps.
// Random samples are applied with a random shift enable; a queue in the
// testbench holds the samples shifted in so far, and every tap k must equal
// the k-th most recent one (tap 0 being the present input), zero before
// enough samples have entered.
module tb_dwt_input_delay;
  localparam int IN_W = 16;

  logic clk = 1'b0, rst_n, shift;
  logic signed [IN_W-1:0] sample_in;
  logic signed [IN_W-1:0] taps2 [2];
  logic signed [IN_W-1:0] taps6 [6];

  dwt_input_delay dut2 (.clk, .rst_n, .shift, .sample_in, .taps(taps2));
  dwt_input_delay #(.TAPS(6)) dut6 (.clk, .rst_n, .shift, .sample_in, .taps(taps6));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_shift = 0, n_hold = 0;
  logic signed [IN_W-1:0] hist [$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [IN_W-1:0] past(int k);
    return (k - 1 < hist.size()) ? hist[k-1] : '0;
  endfunction

  initial begin
    rst_n = 1'b0; shift = 1'b0; sample_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      sample_in = IN_W'($urandom);
      shift = 1'($urandom);
      #1;
      checks++; if (taps2[0] != sample_in || taps6[0] != sample_in) failures++;
      checks++; if (taps2[1] != past(1)) failures++;
      for (int k = 1; k < 6; k++) begin
        checks++;
        if (taps6[k] != past(k)) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d tap %0d: %0h exp %0h", i, k, taps6[k], past(k));
        end
      end
      @(negedge clk);
      if (shift) begin hist.push_front(sample_in); n_shift++; end
      else n_hold++;
    end
    checks++; if (n_shift == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
