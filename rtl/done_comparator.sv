// done_comparator: behavioural model of a clocked comparator with a
// comparison-complete output. Not synthesizable: it stands for an analog
// dynamic comparator followed by an SR latch.
//
// When clk_cmp rises the comparator evaluates; T_CMP later the latched
// output cmp_out takes (vinp > vinn) and, T_DONE after that, done rises.
// When clk_cmp falls the comparator precharges: T_RST later done falls,
// while cmp_out keeps the last decision (the output latch holds it). A clock
// that falls before the decision is reached cancels that comparison.
// Downstream shift registers are clocked by done, so they act on a result
// as soon as it exists instead of one clock later, which keeps the ripple
// low. The behaviour follows the published comparator; the delays are this
// design's own figures (ps).
module done_comparator #(
  parameter int unsigned T_CMP  = dldo_pkg::T_CMP_PS,
  parameter int unsigned T_DONE = dldo_pkg::T_DONE_PS,
  parameter int unsigned T_RST  = dldo_pkg::T_RST_PS
) (
  input  real  vinp,
  input  real  vinn,
  input  logic clk_cmp,
  output logic cmp_out,
  output logic done
);
  timeunit 1ps; timeprecision 1ps;

  // kick repeats a clock that is already high at power-up, where no edge
  // would start the first comparison.
  logic kick;

  initial begin
    cmp_out = 1'b0;
    done    = 1'b0;
    kick    = 1'b0;
    #1 kick = clk_cmp;
  end

  // Evaluation phase: decision T_CMP after the rising clock, DONE T_DONE
  // later, both only if the clock is still high.
  always @(posedge clk_cmp or posedge kick) begin
    #(T_CMP);
    if (clk_cmp) begin
      cmp_out <= (vinp > vinn);
      #(T_DONE);
      if (clk_cmp) done <= 1'b1;
    end
  end

  // Precharge phase: DONE falls T_RST after the falling clock; the output
  // latch keeps cmp_out.
  always @(negedge clk_cmp) begin
    #(T_RST);
    if (!clk_cmp) done <= 1'b0;
  end
endmodule
