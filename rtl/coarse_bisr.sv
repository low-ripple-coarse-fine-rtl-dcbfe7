// coarse_bisr: coarse bidirectional shift register of the coarse power stage.
//
// Thermometer code on active-low PMOS gates: q[i-1] drives coarse switch i,
// and the switches that are on form a run of zeros from stage 1 upward.
// On each rising edge of clk_coarse:
//   inc = 1: stage i takes stage i-1 (stage 1 takes 0): one more switch on.
//   inc = 0: stage i takes stage i+2 (the top two take 1): two switches off.
// The asymmetric step (up by one, down by two) follows the published
// schematic and lets the regulator shed current twice as fast on an
// overshoot. The asynchronous power-on reset rst (all switches off) is this
// design's addition; the schematic shows no reset for this register.
module coarse_bisr #(
  parameter int unsigned N = dldo_pkg::N_UNITS
) (
  input  logic         clk_coarse,
  input  logic         rst,
  input  logic         inc,
  output logic [N-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk_coarse or posedge rst) begin
    if (rst)      q <= '1;
    else if (inc) q <= {q[N-2:0], 1'b0};
    else          q <= {2'b11, q[N-1:2]};
  end
endmodule
