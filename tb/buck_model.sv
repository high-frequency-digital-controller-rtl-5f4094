// Behavioural model of the synchronous buck power stage driven by the
// controller.
//
// Switched (not averaged) model integrated with a fixed STEP_NS time step:
// the switch node is at vg while c is high and at ground while it is low
// (synchronous rectifier, continuous conduction). Inductor L with series
// resistance DCR feeds capacitor C with series resistance ESR, loaded by
// r_load. Output vo is the voltage across the load; il the inductor current.
// Defaults: L = 1 uH and C = 100 uF as in the regulator the controller was
// demonstrated with; the 50 mOhm ESR and DCR are typical parasitics chosen for
// the testbench (they also damp the LC resonance).
module buck_model #(
  parameter real L_H     = 1.0e-6,
  parameter real C_F     = 100.0e-6,
  parameter real ESR     = 0.05,
  parameter real DCR     = 0.05,
  parameter real STEP_NS = 1.0
) (
  input  logic c,
  input  real  vg,
  input  real  r_load,
  output real  vo,
  output real  il
);
  timeunit 1ns;
  timeprecision 1fs;

  real vc = 0.0;     // capacitor voltage
  real i_l = 0.0;
  logic step = 1'b0;

  always #(STEP_NS) step = ~step;

  always @(step) begin
    real vsw, v_out, dt;
    dt    = STEP_NS * 1.0e-9;
    vsw   = c ? vg : 0.0;
    v_out = (r_load * vc + r_load * ESR * i_l) / (r_load + ESR);
    i_l   = i_l + (vsw - DCR * i_l - v_out) / L_H * dt;
    vc    = vc + (i_l - v_out / r_load) / C_F * dt;
    vo    = (r_load * vc + r_load * ESR * i_l) / (r_load + ESR);
    il    = i_l;
  end

endmodule
