// charge_pump: behavioural model of the DLL charge pump.
//
// When add is 1 the pull-up transistor charges the loop filter; when rmv is 1
// the pull-down discharges it. The drive of each is set by an off-chip bias:
// v_add_bias = 0 V gives the fastest charging, and raising it towards
// VDD - VTH slows charging to nothing; the discharge rate grows as v_rmv_bias
// rises above VTH. The model turns this into a signed rate of change of the
// filter voltage, rate_v_per_us, linear in the bias between those limits, with
// MAX_RATE_V_PER_US at the extreme. The direction of each dependence is
// published; the linear shape, VTH and the maximum rate are this design's
// choices. Both commands at once cancel (the control logic never issues both).
module charge_pump
  import pg_pkg::*;
#(
  parameter real MAX_RATE_V_PER_US = 5.0,
  parameter real VTH               = 1.0
) (
  input  logic add,
  input  logic rmv,
  input  real  v_add_bias,
  input  real  v_rmv_bias,
  output real  rate_v_per_us
);
  timeunit 1ps; timeprecision 1fs;

  function automatic real clamp01(input real x);
    return (x < 0.0) ? 0.0 : ((x > 1.0) ? 1.0 : x);
  endfunction

  real up_rate, down_rate;

  always_comb begin
    up_rate       = MAX_RATE_V_PER_US * clamp01((VDD - VTH - v_add_bias) / (VDD - VTH));
    down_rate     = MAX_RATE_V_PER_US * clamp01((v_rmv_bias - VTH) / (VDD - VTH));
    rate_v_per_us = (add ? up_rate : 0.0) - (rmv ? down_rate : 0.0);
  end

endmodule
