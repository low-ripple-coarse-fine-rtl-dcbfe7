// dldo_pkg: constants shared by the coarse-fine digital LDO regulator.
//
// The three power stages each hold 32 PMOS switches. A coarse or auxiliary
// switch carries 16 times the current of a fine switch, so the whole fine
// array (32 units) equals two coarse switches. The unit currents are chosen
// so that 32 coarse switches give the 100 mA maximum load current at the
// nominal 0.2 V dropout (1.2 V in, 1.0 V out); the maximum current and the
// 16:1 ratio are specified, the absolute unit value is derived from them. Timing constants of the behavioural
// comparators are this design's own choice: they set the speed of the
// asynchronous self clock, for which no frequency is specified.
package dldo_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned N_UNITS         = 32;    // switches per array
  localparam int unsigned FINE_PER_COARSE = 16;    // coarse/fine unit ratio
  localparam real I_MAX          = 100.0e-3;       // A, max output current
  localparam real I_UNIT_COARSE  = I_MAX / N_UNITS; // A per coarse/aux switch
  localparam real I_UNIT_FINE    = I_UNIT_COARSE / FINE_PER_COARSE;
  localparam real V_DROP_NOM     = 0.2;            // V, nominal V_IN - V_OUT
  localparam real V_DSAT         = 0.3;            // V, switch saturation (own choice)
  localparam real C_OUT          = 1.0e-9;         // F, on-chip output capacitor
  localparam real CLK_SLOW_HZ    = 50.0e6;         // fine-loop clock
  // Behavioural comparator delays in ps (own choice).
  localparam int unsigned T_CMP_PS  = 200;  // clock rise to decision
  localparam int unsigned T_RST_PS  = 150;  // clock fall to DONE low
  localparam int unsigned T_DONE_PS = 10;   // decision to DONE rise
endpackage
