// tb_fine_bisr: self-checking test of the fine bidirectional shift
// register. A reference count of switches on is stepped +1 (cmp_f=1) or
// -1 (cmp_f=0) per done_f edge, clamped to 0..N; rst_half must force
// exactly N/2 switches on at once and hold them while asserted.
module tb_fine_bisr;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 32;

  logic done_f = 1'b0, cmp_f = 1'b0, rst_half = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;
  int on_cnt = N / 2;

  fine_bisr dut (.done_f, .cmp_f, .rst_half, .q);

  function automatic logic [N-1:0] thermo(int k);
    logic [N-1:0] v = '1;
    for (int i = 0; i < k && i < N; i++) v[i] = 1'b0;
    return v;
  endfunction

  task automatic check(string what);
    checks++;
    if (q !== thermo(on_cnt)) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h", what, q, thermo(on_cnt));
    end
  endtask

  task automatic step(logic dir);
    cmp_f = dir;
    #20 done_f = 1'b1;
    #50 done_f = 1'b0;
    #30;
    if (!rst_half) begin
      if (dir) on_cnt = (on_cnt + 1 > N) ? N : on_cnt + 1;
      else     on_cnt = (on_cnt - 1 < 0) ? 0 : on_cnt - 1;
    end
    check("step");
  endtask

  initial begin
    #5 rst_half = 1'b1;
    #10 check("half reset");
    step(1'b1);                       // held while rst_half is high
    rst_half = 1'b0;
    for (int i = 0; i < N; i++) step(1'b1);
    for (int i = 0; i < N + 5; i++) step(1'b0);
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 60; i++) step(1'($urandom_range(1)));
      #10 rst_half = 1'b1;
      on_cnt = N / 2;
      #1 check("async half reset");
      #10 rst_half = 1'b0;
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
