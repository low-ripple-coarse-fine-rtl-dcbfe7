// peak_detector: behavioural model of the window detector that triggers
// coarse mode. Not synthesizable (analog comparators).
//
// Two done_comparator instances share the asynchronous self clock:
//   CMP2: cmp_h = V_OUT > V_REF_H (overshoot), done_h when resolved;
//   CMP3: cmp_l = V_OUT < V_REF_L (undershoot), done_l when resolved.
// Both evaluate on the rising edge of clk_self_fast and precharge on its
// falling edge, with the comparator delays of done_comparator. Structure
// and comparison senses follow the published schematic.
module peak_detector (
  input  real  v_out,
  input  real  v_ref_h,
  input  real  v_ref_l,
  input  logic clk_self_fast,
  output logic cmp_h,
  output logic done_h,
  output logic cmp_l,
  output logic done_l
);
  timeunit 1ps; timeprecision 1ps;

  done_comparator u_cmp2 (
    .vinp(v_out), .vinn(v_ref_h), .clk_cmp(clk_self_fast),
    .cmp_out(cmp_h), .done(done_h)
  );

  done_comparator u_cmp3 (
    .vinp(v_ref_l), .vinn(v_out), .clk_cmp(clk_self_fast),
    .cmp_out(cmp_l), .done(done_l)
  );
endmodule
