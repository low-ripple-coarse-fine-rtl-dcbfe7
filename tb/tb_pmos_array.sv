// tb_pmos_array: self-checking test of the PMOS array model. Random gate
// vectors (including all-on and all-off) must give a current equal to the
// number of low gates times the unit current, scaled by the dropout
// relative to the nominal 0.2 V, limited at the 0.3 V saturation voltage
// (zero when V_OUT is above V_IN).
module tb_pmos_array;
  timeunit 1ps; timeprecision 1ps;
  localparam int  N = 32;
  localparam real I_UNIT = 100.0e-3 / 32.0;

  logic [N-1:0] gate_n;
  real i_out, v_in = 1.2, v_out = 1.0;
  int checks = 0, failures = 0;

  pmos_array dut (.gate_n, .v_in, .v_out, .i_out);

  initial begin
    for (int n = 0; n < 300; n++) begin
      int on;
      real exp, err;
      if (n == 0)      gate_n = '1;
      else if (n == 1) gate_n = '0;
      else             gate_n = N'($urandom());
      v_out = (n % 3 == 0) ? 1.0 : real'($urandom_range(1300)) * 1.0e-3;
      #10;
      on = 0;
      for (int i = 0; i < N; i++) if (gate_n[i] == 1'b0) on++;
      exp = v_in - v_out;
      if (exp > 0.3) exp = 0.3;
      if (exp < 0.0) exp = 0.0;
      exp = on * I_UNIT * exp / 0.2;
      err = i_out - exp;
      checks++;
      if (err > 1.0e-9 || err < -1.0e-9) begin
        failures++;
        $display("FAIL gate_n=%h i_out=%g exp=%g", gate_n, i_out, exp);
      end
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
