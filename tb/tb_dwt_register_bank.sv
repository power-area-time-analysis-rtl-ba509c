// tb_dwt_register_bank: checks the register bank at two and four taps.
// Random values are pushed into the c chain or the e chain (never both, as
// the control unit guarantees) or into neither; two queues in the testbench
// model the chains, and every tap must equal the matching queue entry, zero
// where nothing has been pushed yet.
module tb_dwt_register_bank;
  localparam int DW = 32;

  logic clk = 1'b0, rst_n, push_c, push_e;
  logic signed [DW-1:0] din;
  logic signed [DW-1:0] c2 [2], e2 [2], c4 [4], e4 [4];

  dwt_register_bank dut2 (.clk, .rst_n, .push_c, .push_e, .din, .c_taps(c2), .e_taps(e2));
  dwt_register_bank #(.TAPS(4)) dut4 (.clk, .rst_n, .push_c, .push_e, .din, .c_taps(c4), .e_taps(e4));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_c = 0, n_e = 0;
  int qc[$], qe[$];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int at(ref int q[$], input int k);
    return (k < q.size()) ? q[k] : 0;
  endfunction

  initial begin
    int r;
    rst_n = 1'b0; push_c = 1'b0; push_e = 1'b0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      r = $urandom_range(0, 2);
      push_c = (r == 1); push_e = (r == 2);
      din = int'($urandom);
      @(negedge clk);
      if (push_c) begin qc.push_front(din); n_c++; end
      if (push_e) begin qe.push_front(din); n_e++; end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (c4[k] != at(qc, k) || e4[k] != at(qe, k) ||
            (k < 2 && (c2[k] != at(qc, k) || e2[k] != at(qe, k)))) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d tap %0d", i, k);
        end
      end
    end
    checks++; if (n_c == 0 || n_e == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
