// tb_aux_sr: self-checking test of the auxiliary shift register.
// Holds set_aux, checks all switches off, then releases it and checks that
// each clk_aux edge turns exactly one more switch on (thermometer from
// stage 1), that the count saturates at N, and that raising set_aux turns
// everything off again immediately, without a clock edge.
module tb_aux_sr;
  timeunit 1ps; timeprecision 1ps;
  localparam int unsigned N = 32;

  logic clk_aux = 1'b0, set_aux = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  aux_sr dut (.clk_aux, .set_aux, .q);

  function automatic logic [N-1:0] thermo(int unsigned k);
    logic [N-1:0] v = '1;
    for (int unsigned i = 0; i < k && i < N; i++) v[i] = 1'b0;
    return v;
  endfunction

  task automatic check(logic [N-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h", what, q, exp);
    end
  endtask

  task automatic pulse();
    #100 clk_aux = 1'b1;
    #100 clk_aux = 1'b0;
  endtask

  initial begin
    #5 set_aux = 1'b1;
    #50;
    check('1, "set");
    pulse();
    check('1, "clock ignored while set");
    for (int round = 0; round < 3; round++) begin
      int unsigned steps = (round == 0) ? N + 3 : 1 + $urandom_range(20);
      #50 set_aux = 1'b0;
      for (int unsigned k = 1; k <= steps; k++) begin
        pulse();
        #1 check(thermo(k), "shift");
      end
      #30 set_aux = 1'b1;
      #1 check('1, "async set");
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
