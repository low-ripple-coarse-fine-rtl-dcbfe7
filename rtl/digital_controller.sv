// digital_controller: mode logic of the coarse-fine digital LDO.
//
// Inputs are the two peak-detector comparators: cmp_h/done_h (V_OUT above
// V_REF_H) and cmp_l/done_l (V_OUT below V_REF_L), plus the slow fine-loop
// clock and the auxiliary-stage enable. Everything is combinational except
// the INC latch:
//   fine_en       = neither cmp_h nor cmp_l: V_OUT inside the window.
//   clk_f_cmp     = clk_slow gated by fine_en; the fine comparator stops
//                   in coarse mode.
//   rst_half      = not fine_en; holds the fine array at half current for
//                   the whole of coarse mode.
//   inc           = SR latch, set by cmp_l (undershoot: add current) and
//                   reset by cmp_h (overshoot: remove current); it keeps its
//                   value while both are low.
//   clk_coarse    = (cmp_h and done_h) or (cmp_l and done_l): one coarse
//                   shift per fast comparison that reports an excursion.
//   clk_aux       = cmp_l and done_l (and aux_en): one auxiliary shift per
//                   undershooting comparison.
//   set_aux       = not (cmp_l and aux_en): the auxiliary array is held off
//                   except during an undershoot.
//   clk_self_fast = not (done_h and done_l): falls once both peak
//                   comparators have finished, which resets them; their
//                   DONE outputs fall and the clock rises again. Together
//                   with the comparators this forms a free-running
//                   asynchronous clock, so no fast clock generator is needed.
// The signal set and the mode behaviour follow the published controller
// description. aux_en is the measurement enable of the auxiliary stage;
// gating set_aux and clk_aux with it is this design's choice.
// The INC latch is intended: it is the SR latch of the controller, written
// as a level-sensitive latch with enable (cmp_h | cmp_l) and data cmp_l, so
// a latch is reported for it.
module digital_controller (
  input  logic cmp_h,
  input  logic done_h,
  input  logic cmp_l,
  input  logic done_l,
  input  logic clk_slow,
  input  logic aux_en,
  output logic fine_en,
  output logic clk_f_cmp,
  output logic rst_half,
  output logic inc,
  output logic clk_coarse,
  output logic clk_aux,
  output logic set_aux,
  output logic clk_self_fast
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    fine_en       = ~(cmp_h | cmp_l);
    clk_f_cmp     = clk_slow & fine_en;
    rst_half      = ~fine_en;
    clk_coarse    = (cmp_h & done_h) | (cmp_l & done_l);
    clk_aux       = cmp_l & done_l & aux_en;
    set_aux       = ~(cmp_l & aux_en);
    clk_self_fast = ~(done_h & done_l);
  end

  // SR latch: set by undershoot, reset by overshoot.
  always_latch begin
    if (cmp_l | cmp_h) inc = cmp_l;
  end
endmodule
