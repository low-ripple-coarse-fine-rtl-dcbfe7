// tb_peak_detector: self-checking test of the window detector. The
// testbench closes the self-clock loop itself (clock = not(done_h and
// done_l)) and sweeps V_OUT through and outside the 0.985..1.015 V window:
// cmp_h must flag only values above V_REF_H and cmp_l only values below
// V_REF_L, the loop must keep oscillating, and both DONE signals must pulse
// once per self-clock period.
module tb_peak_detector;
  timeunit 1ps; timeprecision 1ps;

  real  v_out = 1.0, v_ref_h = 1.015, v_ref_l = 0.985;
  logic clk_self_fast;
  logic cmp_h, done_h, cmp_l, done_l;
  int checks = 0, failures = 0;
  int n_clk = 0, n_done_h = 0, n_done_l = 0;

  assign clk_self_fast = ~(done_h & done_l);

  peak_detector dut (.v_out, .v_ref_h, .v_ref_l, .clk_self_fast,
                     .cmp_h, .done_h, .cmp_l, .done_l);

  always @(posedge clk_self_fast) n_clk++;
  always @(posedge done_h) n_done_h++;
  always @(posedge done_l) n_done_l++;

  initial begin
    #1000;
    for (int n = 0; n < 100; n++) begin
      v_out = 0.95 + real'($urandom_range(1000)) * 1.0e-4;   // 0.95..1.05 V
      @(posedge done_l);        // first comparison may have started earlier
      @(posedge done_l);
      #1;
      checks++;
      if (cmp_h !== (v_out > v_ref_h) || cmp_l !== (v_out < v_ref_l)) begin
        failures++;
        $display("FAIL v_out=%f cmp_h=%b cmp_l=%b", v_out, cmp_h, cmp_l);
      end
    end
    checks++;
    if (n_clk < 200 || n_done_h < n_clk - 1 || n_done_l < n_clk - 1) begin
      failures++;
      $display("FAIL self clock: clk=%0d done_h=%0d done_l=%0d", n_clk, n_done_h, n_done_l);
    end
    $display("self clock cycles %0d", n_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
