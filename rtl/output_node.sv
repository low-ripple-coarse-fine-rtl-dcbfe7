// output_node: behavioural model of the regulator output node. Not
// synthesizable.
//
// The on-chip output capacitor C integrates the difference between the
// power-stage current i_out and the load current i_load:
//   dV_OUT/dt = (i_out - i_load) / C,
// stepped with forward Euler every T_STEP ps. V_OUT is clamped to the range
// 0 .. v_in, since the PMOS switches cannot lift the output above the input.
// V_OUT starts at V_INIT. The 1 nF capacitor is the published value; the
// time step is this model's own.
module output_node #(
  parameter real         C      = dldo_pkg::C_OUT,
  parameter int unsigned T_STEP = 5,
  parameter real         V_INIT = 0.0
) (
  input  real v_in,
  input  real i_out,
  input  real i_load,
  output real v_out
);
  timeunit 1ps; timeprecision 1ps;

  localparam real DT = real'(T_STEP) * 1.0e-12;

  initial v_out = V_INIT;

  always #(T_STEP) begin
    v_out = v_out + (i_out - i_load) * DT / C;
    if (v_out < 0.0)  v_out = 0.0;
    if (v_out > v_in) v_out = v_in;
  end
endmodule
