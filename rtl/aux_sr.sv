// aux_sr: auxiliary shift register of the auxiliary power stage.
//
// A plain N-stage shift register that feeds a constant 0 into stage 1 and
// shifts toward stage N on every rising edge of clk_aux. Every stage has an
// asynchronous set: while set_aux is high all outputs are 1, which keeps
// every auxiliary PMOS switch off (the gates are active low, q[i-1] drives
// switch i). During an undershoot set_aux is released and each clk_aux edge
// turns one more auxiliary switch on; as soon as the undershoot ends set_aux
// returns high and the auxiliary current drops to zero in one step.
// Structure, width and set behaviour follow the published schematic; the
// active-low bit order (bit 0 = stage 1) is this design's convention.
module aux_sr #(
  parameter int unsigned N = dldo_pkg::N_UNITS
) (
  input  logic         clk_aux,
  input  logic         set_aux,
  output logic [N-1:0] q
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk_aux or posedge set_aux) begin
    if (set_aux) q <= '1;
    else         q <= {q[N-2:0], 1'b0};
  end
endmodule
