// tb_output_node: self-checking test of the output-capacitor model. With a
// constant net current the voltage must ramp at (i_out - i_load)/C; it must
// stay flat for zero net current and clamp at 0 V and at v_in.
module tb_output_node;
  timeunit 1ps; timeprecision 1ps;
  localparam real C = 1.0e-9;

  real v_in = 1.2, i_out = 0.0, i_load = 0.0, v_out;
  int checks = 0, failures = 0;

  output_node #(.C(C), .T_STEP(5), .V_INIT(0.5)) dut (.v_in, .i_out, .i_load, .v_out);

  task automatic near(real got, real exp, real tol, string what);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    real v0;
    #1000;
    near(v_out, 0.5, 1.0e-6, "initial value, zero net current");
    for (int n = 0; n < 20; n++) begin
      real di;
      di = (real'($urandom_range(200)) - 100.0) * 1.0e-4;   // -10..+10 mA
      i_out = 0.02 + di; i_load = 0.02;
      v0 = v_out;
      #10000;                                             // 10 ns
      near(v_out, v0 + di * 10.0e-9 / C, 2.0e-3, "slope");
      i_out = 0.0; i_load = 0.0;
      #10;
      if (v_out > 0.8 || v_out < 0.2) begin               // recentre
        i_out = (v_out < 0.5) ? 0.01 : 0.0;
        i_load = (v_out < 0.5) ? 0.0 : 0.01;
        while (v_out > 0.55 || v_out < 0.45) #5;
        i_out = 0.0; i_load = 0.0;
      end
    end
    i_out = 0.2;  #20000 near(v_out, 1.2, 1.0e-9, "clamp at v_in");
    i_out = 0.0; i_load = 0.2; #20000 near(v_out, 0.0, 1.0e-9, "clamp at 0");
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
