// dldo_top: coarse-fine digital low-dropout regulator with an auxiliary
// power stage. Mixed model: the control logic (digital_controller and the
// three shift registers) is synthesizable RTL; comparators, PMOS arrays and
// the output capacitor are behavioural models, so this top is a behavioural
// model of the whole regulator core including its output node.
//
// Fine mode (V_REF_L <= V_OUT <= V_REF_H): CMP1 compares V_OUT with V_REF on
// clk_slow; each DONE_F edge moves the fine array (32 x 1 unit) by one
// switch. Coarse mode (V_OUT outside the window, detected by the
// self-clocked peak detector): CMP1 stops, the fine array is held at half
// current, and each fast comparison adds one coarse switch (undershoot) or
// removes two (overshoot). During an undershoot the auxiliary array (32 x 16
// units) also gains one switch per comparison, so the output current climbs
// twice as fast; when V_OUT is back above V_REF_L the auxiliary array is
// released at once, roughly halving the output current to the load current
// and avoiding the overshoot that a plain shift-register loop would ring
// with. Coarse and auxiliary switches are 16 fine units.
//
// Ports: analog quantities are real (volts, amperes). rst is a power-on
// reset (this design's addition): coarse and auxiliary arrays off, fine
// array at half. Two assertions check the mode rules on clk_slow edges;
// they read rst as a disable, which is why lint reports rst as used both
// synchronously and asynchronously.
// i_load is the load current drawn from the output node; v_out and i_out
// are the node voltage and the total power-stage current. The array codes
// and control signals are brought out for observation.
module dldo_top #(
  parameter int unsigned N = dldo_pkg::N_UNITS
) (
  input  logic         clk_slow,
  input  logic         rst,
  input  logic         aux_en,
  input  real          v_in,
  input  real          v_ref,
  input  real          v_ref_h,
  input  real          v_ref_l,
  input  real          i_load,
  output real          v_out,
  output real          i_out,
  output logic [N-1:0] aux_q,
  output logic [N-1:0] coarse_q,
  output logic [N-1:0] fine_q,
  output logic         fine_en,
  output logic         inc,
  output logic         rst_half,
  output logic         clk_coarse,
  output logic         clk_aux,
  output logic         clk_self_fast,
  output logic         cmp_f,
  output logic         done_f
);
  timeunit 1ps; timeprecision 1ps;

  logic cmp_h, done_h, cmp_l, done_l;
  logic clk_f_cmp, set_aux, set_aux_por, rst_fine;
  real  i_aux, i_coarse, i_fine;

  peak_detector u_peak (
    .v_out, .v_ref_h, .v_ref_l, .clk_self_fast,
    .cmp_h, .done_h, .cmp_l, .done_l
  );

  digital_controller u_ctrl (
    .cmp_h, .done_h, .cmp_l, .done_l, .clk_slow, .aux_en,
    .fine_en, .clk_f_cmp, .rst_half, .inc, .clk_coarse, .clk_aux,
    .set_aux, .clk_self_fast
  );

  // CMP1: fine comparator, cmp_f = 1 when V_OUT is below V_REF.
  done_comparator u_cmp1 (
    .vinp(v_ref), .vinn(v_out), .clk_cmp(clk_f_cmp),
    .cmp_out(cmp_f), .done(done_f)
  );

  // The power-on reset also presets the fine and auxiliary registers.
  assign rst_fine    = rst_half | rst;
  assign set_aux_por = set_aux | rst;

  aux_sr #(.N(N)) u_aux_sr (
    .clk_aux, .set_aux(set_aux_por), .q(aux_q)
  );

  coarse_bisr #(.N(N)) u_coarse_sr (
    .clk_coarse, .rst, .inc, .q(coarse_q)
  );

  fine_bisr #(.N(N)) u_fine_sr (
    .done_f, .cmp_f, .rst_half(rst_fine), .q(fine_q)
  );

  pmos_array #(.N(N), .I_UNIT(dldo_pkg::I_UNIT_COARSE)) u_aux_pmos (
    .gate_n(aux_q), .v_in, .v_out, .i_out(i_aux)
  );

  pmos_array #(.N(N), .I_UNIT(dldo_pkg::I_UNIT_COARSE)) u_coarse_pmos (
    .gate_n(coarse_q), .v_in, .v_out, .i_out(i_coarse)
  );

  pmos_array #(.N(N), .I_UNIT(dldo_pkg::I_UNIT_FINE)) u_fine_pmos (
    .gate_n(fine_q), .v_in, .v_out, .i_out(i_fine)
  );

  always_comb i_out = i_aux + i_coarse + i_fine;

  output_node u_node (
    .v_in, .i_out, .i_load, .v_out
  );

  // Mode rules, sampled on the fine-loop clock: in fine mode the auxiliary
  // array is off; in coarse mode the fine array is held at half scale.
  localparam logic [N-1:0] FINE_HALF = {{(N - N/2){1'b1}}, {(N/2){1'b0}}};

  a_aux_off_in_fine: assert property (
    @(posedge clk_slow) disable iff (rst) fine_en |-> (aux_q == '1))
    else $error("auxiliary array on in fine mode: %h", aux_q);

  a_fine_half_in_coarse: assert property (
    @(posedge clk_slow) disable iff (rst) !fine_en |-> (fine_q == FINE_HALF))
    else $error("fine array not at half scale in coarse mode: %h", fine_q);
endmodule
