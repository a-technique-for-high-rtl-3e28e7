// dll_control_logic: turns the phase detector's two flags into charge pump
// commands.
//
// The rule: phi2_first alone means the later tap arrives too early, i.e. the
// delay being locked is too short, so add charge (raise V_DP, which lengthens
// the delay). phi1_first alone means the delay is too long, so remove charge.
// Both low (in phase) and both high (the invalid 1-1 state) give no command,
// which is how erroneous 1-1 states are filtered out. enable = 0 forces both
// commands off; it is how the coarse clock DLL is switched off before the fine
// one is switched on. The filtering of 1-1 is published; the add/remove
// polarity follows from the published bias-versus-delay relation, and the
// enable input is this design's way of disabling a DLL. Purely combinational.
module dll_control_logic (
  input  logic enable,
  input  logic phi1_first,
  input  logic phi2_first,
  output logic add,
  output logic rmv
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    add = enable &  phi2_first & ~phi1_first;
    rmv = enable &  phi1_first & ~phi2_first;
  end

endmodule
