// pmos_array: behavioural model of one PMOS power array. Not synthesizable.
//
// N switches with active-low gates (gate_n[i] = 0 turns switch i on), each
// connecting V_IN to V_OUT. At a dropout of a few hundred millivolts the
// switches work in the triode region, so each is modelled as a conductance
// that passes exactly I_UNIT at the nominal dropout V_DROP_NOM (1.2 V in,
// 1.0 V out) and proportionally more or less at other dropouts; above the
// saturation voltage V_DSAT the current stops growing:
//   i_out = (switches on) * I_UNIT * min(v_in - v_out, V_DSAT) / V_DROP_NOM,
// never negative. This piecewise-linear switch model and V_DSAT are this
// design's simplifications.
// The default unit is a coarse/auxiliary switch (1/32 of the 100 mA maximum
// current); the fine array uses 1/16 of that.
module pmos_array #(
  parameter int unsigned N          = dldo_pkg::N_UNITS,
  parameter real         I_UNIT     = dldo_pkg::I_UNIT_COARSE,
  parameter real         V_DROP_NOM = dldo_pkg::V_DROP_NOM,
  parameter real         V_DSAT     = dldo_pkg::V_DSAT
) (
  input  logic [N-1:0] gate_n,
  input  real          v_in,
  input  real          v_out,
  output real          i_out
);
  timeunit 1ps; timeprecision 1ps;

  real drop;

  always_comb begin
    drop = v_in - v_out;
    if (drop > V_DSAT) drop = V_DSAT;
    if (drop < 0.0)    drop = 0.0;
    i_out = real'($countones(~gate_n)) * I_UNIT * drop / V_DROP_NOM;
  end
endmodule
