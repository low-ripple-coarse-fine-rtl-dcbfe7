// fine_bisr: fine bidirectional shift register of the fine power stage.
//
// Thermometer code on active-low PMOS gates, q[i-1] driving fine switch i.
// It is clocked by the comparison-complete signal of the fine comparator
// (done_f), so the array reacts as soon as a comparison has resolved rather
// than one clock later. On each rising edge of done_f:
//   cmp_f = 1 (V_OUT below V_REF): stage i takes stage i-1, stage 1 takes 0,
//                                  one more switch on;
//   cmp_f = 0: stage i takes stage i+1, stage N takes 1, one switch off.
// rst_half is an asynchronous, level-sensitive preset: the lower half of
// the stages is reset to 0 and the upper half set to 1, so exactly N/2
// switches are on (a current of one coarse step). It is held for the whole
// of coarse mode. Structure and half reset follow the published schematic.
module fine_bisr #(
  parameter int unsigned N = dldo_pkg::N_UNITS
) (
  input  logic         done_f,
  input  logic         cmp_f,
  input  logic         rst_half,
  output logic [N-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  localparam logic [N-1:0] HALF = {{(N - N/2){1'b1}}, {(N/2){1'b0}}};

  always_ff @(posedge done_f or posedge rst_half) begin
    if (rst_half)   q <= HALF;
    else if (cmp_f) q <= {q[N-2:0], 1'b0};
    else            q <= {1'b1, q[N-1:1]};
  end
endmodule
