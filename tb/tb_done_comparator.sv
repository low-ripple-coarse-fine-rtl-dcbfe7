// tb_done_comparator: self-checking test of the comparator model.
// For random input pairs: after a rising clock, cmp_out must be unchanged
// before T_CMP and show (vinp > vinn) after it, done must rise T_DONE
// later, fall T_RST after the falling clock, and cmp_out must hold its
// value through the precharge phase even when the inputs change.
module tb_done_comparator;
  timeunit 1ps; timeprecision 1ps;
  localparam int T_CMP  = int'(dldo_pkg::T_CMP_PS);
  localparam int T_DONE = int'(dldo_pkg::T_DONE_PS);
  localparam int T_RST  = int'(dldo_pkg::T_RST_PS);

  real  vinp = 0.0, vinn = 0.0;
  logic clk_cmp = 1'b0;
  logic cmp_out, done;
  int checks = 0, failures = 0;

  done_comparator dut (
    .vinp, .vinn, .clk_cmp, .cmp_out, .done
  );

  task automatic expect_eq(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b exp %b", what, $time, got, exp);
    end
  endtask

  initial begin
    #1000;
    for (int n = 0; n < 200; n++) begin
      logic prev, exp;
      prev = cmp_out;
      vinp = 1.0 + (real'($urandom_range(200)) - 100.0) * 1.0e-4;
      vinn = 1.0;
      exp  = vinp > vinn;
      clk_cmp = 1'b1;
      #(T_CMP - 5);
      expect_eq(done, 1'b0, "done before decision");
      expect_eq(cmp_out, prev, "output held before decision");
      #(T_DONE);
      expect_eq(cmp_out, exp, "decision");
      expect_eq(done, 1'b0, "done after decision delay only");
      #(10);
      expect_eq(done, 1'b1, "done raised");
      vinp = 2.0 - vinp;          // inputs move while precharging
      #100 clk_cmp = 1'b0;
      #(T_RST - 5);
      expect_eq(done, 1'b1, "done before reset delay");
      #10;
      expect_eq(done, 1'b0, "done reset");
      expect_eq(cmp_out, exp, "output latched");
      #200;
    end
    // A clock pulse shorter than T_CMP produces no comparison.
    vinp = 0.5; vinn = 1.0;
    clk_cmp = 1'b1;
    #100 clk_cmp = 1'b0;
    #400;
    expect_eq(done, 1'b0, "short pulse: no done");
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
