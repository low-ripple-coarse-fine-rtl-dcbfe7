// tb_digital_controller: self-checking test of the mode logic. Walks all
// combinations of cmp_h, done_h, cmp_l, done_l, clk_slow and aux_en in
// random order and compares every output with the expected mode behaviour;
// the INC latch is checked against a reference that remembers the last
// excursion (undershoot sets, overshoot clears, neither holds).
module tb_digital_controller;
  timeunit 1ps; timeprecision 1ps;

  logic cmp_h, done_h, cmp_l, done_l, clk_slow, aux_en;
  logic fine_en, clk_f_cmp, rst_half, inc, clk_coarse, clk_aux, set_aux,
        clk_self_fast;
  int checks = 0, failures = 0;
  logic inc_ref;

  digital_controller dut (.*);

  task automatic expect_eq(logic got, logic exp, string what, logic [5:0] v);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b (in=%b)", what, got, exp, v);
    end
  endtask

  initial begin
    {cmp_h, done_h, cmp_l, done_l, clk_slow, aux_en} = 6'b000011;
    cmp_l = 1'b1;                 // start from a known INC value
    #10 cmp_l = 1'b0;
    inc_ref = 1'b1;
    for (int n = 0; n < 400; n++) begin
      logic [5:0] v;
      v = (n < 64) ? 6'(n) : 6'($urandom_range(63));
      if (v[5] && v[3]) v[5] = 1'b0;   // over- and undershoot together are impossible
      {cmp_h, done_h, cmp_l, done_l, clk_slow, aux_en} = v;
      #10;
      if (cmp_l) inc_ref = 1'b1;
      else if (cmp_h) inc_ref = 1'b0;
      expect_eq(fine_en, !cmp_h && !cmp_l, "fine_en", v);
      expect_eq(clk_f_cmp, clk_slow && !cmp_h && !cmp_l, "clk_f_cmp", v);
      expect_eq(rst_half, cmp_h || cmp_l, "rst_half", v);
      expect_eq(inc, inc_ref, "inc", v);
      expect_eq(clk_coarse, (cmp_h && done_h) || (cmp_l && done_l), "clk_coarse", v);
      expect_eq(clk_aux, cmp_l && done_l && aux_en, "clk_aux", v);
      expect_eq(set_aux, !(cmp_l && aux_en), "set_aux", v);
      expect_eq(clk_self_fast, !(done_h && done_l), "clk_self_fast", v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
