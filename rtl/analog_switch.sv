// Behavioural model (not synthesizable logic as written) of the analog input
// switch of the calibrated delay-line A/D converter.
//
// The switch supplies the delay line either from the precise reference
// voltage (select low) or from the sensed converter output (select high), so
// the same line converts both in turn within one switching period. The
// polarity of select follows the calibration timing of the document (V_ref
// while select is low, V_sense while it is high); the switch is ideal here,
// with no resistance and no transition time.
module analog_switch (
  input  real  v_ref,
  input  real  v_sense,
  input  logic select,
  output real  v_out
);
  timeunit 1ns;
  timeprecision 1fs;

  always_comb v_out = select ? v_sense : v_ref;

endmodule
