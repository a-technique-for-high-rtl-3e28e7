// loop_filter: behavioural model of the off-chip DLL loop filter.
//
// The published chip leaves the filter off-chip (a simple RC or an active
// filter). This model is the simplest form that does the job, an integrating
// capacitor: every STEP_PS picoseconds v_out moves by the sum of the charge
// pump rates (volts per microsecond) times the step, clamped to 0..VDD.
// Two rate inputs let the coarse and fine clock DLLs charge one shared filter;
// the data DLL ties the second to 0. v_out starts at V_INIT, which stands for
// whatever voltage the filter holds at power-up.
module loop_filter
  import pg_pkg::*;
#(
  parameter real V_INIT  = 1.5,
  parameter real STEP_PS = 50.0
) (
  input  real rate_a_v_per_us,
  input  real rate_b_v_per_us,
  output real v_out
);
  timeunit 1ps; timeprecision 1fs;

  real v = V_INIT;

  always begin
    #(STEP_PS);
    v = v + (rate_a_v_per_us + rate_b_v_per_us) * STEP_PS * 1.0e-6;
    if (v < 0.0) v = 0.0;
    if (v > VDD) v = VDD;
  end

  assign v_out = v;

endmodule
