// dll: one delay-locked loop's detector and pump.
//
// phi1 and phi2 are two taps whose rising edges must line up; the phase
// detector says which came first, the control logic turns that into add
// (delay too short) or rmv (delay too long), gated by enable, and the charge
// pump turns the command into a rate of change of the bias held by a loop
// filter outside this module. The shared filter lets two DLLs, one coarse and
// one fine, take turns adjusting the same bias. Arrangement as published; the
// models of the parts are described in their own files.
module dll #(
  parameter real DEAD_ZONE_PS = 100.0
) (
  input  logic enable,
  input  logic phi1,
  input  logic phi2,
  input  real  v_add_bias,
  input  real  v_rmv_bias,
  output logic phi1_first,
  output logic phi2_first,
  output logic add,
  output logic rmv,
  output real  rate_v_per_us
);
  timeunit 1ps; timeprecision 1fs;

  phase_detector #(.DEAD_ZONE_PS(DEAD_ZONE_PS)) u_pd (
    .phi1(phi1), .phi2(phi2), .phi1_first(phi1_first), .phi2_first(phi2_first));

  dll_control_logic u_ctl (
    .enable(enable), .phi1_first(phi1_first), .phi2_first(phi2_first),
    .add(add), .rmv(rmv));

  charge_pump u_cp (
    .add(add), .rmv(rmv), .v_add_bias(v_add_bias), .v_rmv_bias(v_rmv_bias),
    .rate_v_per_us(rate_v_per_us));

endmodule
