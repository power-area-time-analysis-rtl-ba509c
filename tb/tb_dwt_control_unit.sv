// tb_dwt_control_unit: checks the control unit's schedule and switch.
// After a random hold with en = 0 (nothing may move), the unit runs for 40
// periods of 8 time units. For every time unit the testbench works out from
// its own time-unit count which octave the schedule assigns (odd: first;
// 4, 8: second; 8k+10: third; otherwise idle) and checks sel, issue, oct,
// slot, the phase and sample_take pattern, and that the operands equal the
// input-delay taps, the c taps or the e taps accordingly (zero when idle).
// It also checks the register-bank pushes for each result octave.
module tb_dwt_control_unit;
  import dwt_pkg::*;
  localparam int TAPS = 2, IN_W = 16, DW = 32;

  logic clk = 1'b0, rst_n, en, phase, sample_take, issue, fu_valid, push_c, push_e;
  logic [2:0] slot;
  sel_t sel;
  octave_t oct, fu_oct;
  logic signed [IN_W-1:0] id_taps [TAPS];
  logic signed [DW-1:0] c_taps [TAPS], e_taps [TAPS], operands [TAPS];

  dwt_control_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sel[4];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic rnd_inputs();
    for (int k = 0; k < TAPS; k++) begin
      id_taps[k] = IN_W'($urandom); c_taps[k] = int'($urandom); e_taps[k] = int'($urandom);
    end
    fu_valid = 1'($urandom); fu_oct = octave_t'($urandom);
  endtask

  initial begin
    sel_t exp_sel;
    rst_n = 1'b0; en = 1'b0;
    rnd_inputs();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat ($urandom_range(1, 5)) begin
      @(negedge clk);
      chk(!phase && !sample_take && slot == 3'd0, "held while en = 0");
    end
    en = 1'b1;
    for (int t = 1; t <= 320; t++) begin
      if (t % 2 == 1)                  exp_sel = SEL_ID;
      else if (t % 4 == 0)             exp_sel = SEL_RB_C;
      else if (t % 8 == 2 && t >= 10)  exp_sel = SEL_RB_E;
      else                             exp_sel = SEL_IDLE;
      n_sel[exp_sel]++;
      for (int ph = 0; ph < 2; ph++) begin
        rnd_inputs();
        #1;
        chk(phase == ph[0] && sample_take == ph[0], $sformatf("tu %0d phase", t));
        chk(slot == 3'((t - 1) % 8), $sformatf("tu %0d slot %0d", t, slot));
        chk(sel == exp_sel, $sformatf("tu %0d sel %s exp %s", t, sel.name(), exp_sel.name()));
        chk(issue == (exp_sel != SEL_IDLE), $sformatf("tu %0d issue", t));
        chk(oct == octave_t'(exp_sel == SEL_ID ? 1 : exp_sel == SEL_RB_C ? 2 :
                             exp_sel == SEL_RB_E ? 3 : 0), $sformatf("tu %0d oct", t));
        for (int k = 0; k < TAPS; k++)
          chk(operands[k] == (exp_sel == SEL_ID   ? DW'(id_taps[k]) :
                              exp_sel == SEL_RB_C ? c_taps[k] :
                              exp_sel == SEL_RB_E ? e_taps[k] : '0), $sformatf("tu %0d operand %0d", t, k));
        chk(push_c == (ph == 1 && fu_valid && fu_oct == 2'd1), "push_c");
        chk(push_e == (ph == 1 && fu_valid && fu_oct == 2'd2), "push_e");
        @(negedge clk);
      end
    end
    foreach (n_sel[i]) chk(n_sel[i] > 0, "every selection seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
