// bias_controller: behavioural model of the automatic bias controller that
// derives a delay line's NMOS bias V_DN from its PMOS bias V_DP.
//
// The delay elements have two biases, and the DLLs adjust only V_DP. This
// circuit keeps the second one in step: a replica stack with a PMOS driven
// by V_DP on top and an NMOS driven by V_DN at the bottom forms a divider
// whose midpoint V_div is compared with VDD/2. When V_div is above VDD/2 the
// comparator raises V_DN (a stronger pull-down), otherwise it lowers it, so
// V_DN rises as V_DP falls and the divider is held at mid-supply. The stack
// and the comparator follow the published circuit.
//
// Model (own choice, since no device data is given): each controlled device
// is a conductance proportional to its gate overdrive, VDD - V_DP - VTH for
// the PMOS and V_DN - VTH for the NMOS; the two series devices in the middle
// of the stack are equal on both sides and drop out. V_div = VDD * g_p /
// (g_p + g_n). Every STEP_PS the comparator moves V_DN by SLEW_V_PER_US in
// the direction that brings V_div back to VDD/2, clamped to 0..VDD. The
// balance point is g_p = g_n, i.e. V_DN = VDD - V_DP, which V_DN tracks
// within one step once it has caught up with V_DP.
//
// Interface: v_dp in (real, volts); v_dn, v_div out (real, volts);
// cmp_high is the comparator output (1: V_div above VDD/2).
module bias_controller
  import pg_pkg::*;
#(
  parameter real VTH           = 1.0,
  parameter real SLEW_V_PER_US = 20.0,
  parameter real STEP_PS       = 200.0,
  parameter real V_INIT        = V_NOMINAL
) (
  input  real  v_dp,
  output real  v_dn,
  output real  v_div,
  output logic cmp_high
);
  timeunit 1ps; timeprecision 1fs;

  real vn = V_INIT;
  real vd = VDD / 2.0;
  logic hi = 1'b0;

  function automatic real overdrive(input real v);
    return (v > 0.0) ? v : 0.0;
  endfunction

  always begin
    real gp, gn;
    #(STEP_PS);
    gp = overdrive(VDD - v_dp - VTH);
    gn = overdrive(vn - VTH);
    vd = (gp + gn > 0.0) ? VDD * gp / (gp + gn) : VDD / 2.0;
    hi = (vd > VDD / 2.0);
    vn = hi ? vn + SLEW_V_PER_US * STEP_PS * 1.0e-6 : vn - SLEW_V_PER_US * STEP_PS * 1.0e-6;
    if (vn < 0.0) vn = 0.0;
    if (vn > VDD) vn = VDD;
  end

  assign v_dn     = vn;
  assign v_div    = vd;
  assign cmp_high = hi;

endmodule
