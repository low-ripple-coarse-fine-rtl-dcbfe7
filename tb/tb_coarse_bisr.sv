// tb_coarse_bisr: self-checking test of the coarse bidirectional shift
// register. A reference counter of switches that are on is stepped +1 on
// inc and -2 on dec (clamped to 0..N); after every clock the register must
// hold the matching thermometer code. Random directions plus directed runs
// to full scale and back to zero; also checks the asynchronous reset.
module tb_coarse_bisr;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 32;

  logic clk_coarse = 1'b0, rst = 1'b0, inc = 1'b0;
  logic [N-1:0] q;
  int checks = 0, failures = 0;
  int on_cnt = 0;

  coarse_bisr dut (.clk_coarse, .rst, .inc, .q);

  function automatic logic [N-1:0] thermo(int k);
    logic [N-1:0] v = '1;
    for (int i = 0; i < k && i < N; i++) v[i] = 1'b0;
    return v;
  endfunction

  task automatic step(logic dir);
    inc = dir;
    #50 clk_coarse = 1'b1;
    #50 clk_coarse = 1'b0;
    if (dir) on_cnt = (on_cnt + 1 > N) ? N : on_cnt + 1;
    else     on_cnt = (on_cnt - 2 < 0) ? 0 : on_cnt - 2;
    checks++;
    if (q !== thermo(on_cnt)) begin
      failures++;
      $display("FAIL step inc=%b: q=%h exp=%h", dir, q, thermo(on_cnt));
    end
  endtask

  initial begin
    #5 rst = 1'b1;
    #20 rst = 1'b0;
    checks++;
    if (q !== '1) begin failures++; $display("FAIL reset q=%h", q); end
    for (int i = 0; i < N + 4; i++) step(1'b1);
    for (int i = 0; i < N / 2 + 3; i++) step(1'b0);
    for (int i = 0; i < 400; i++) step(1'($urandom_range(1)));
    for (int i = 0; i < 7; i++) step(1'b1);
    step(1'b0);
    #10 rst = 1'b1;
    #10 on_cnt = 0;
    checks++;
    if (q !== '1) begin failures++; $display("FAIL async reset q=%h", q); end
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
