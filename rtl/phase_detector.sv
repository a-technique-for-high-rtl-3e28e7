// phase_detector: behavioural model of the DLL's edge-order detector.
//
// Two flip-flops are cross-connected: one samples phi1 on the rising edge of
// phi2 (phi1_first), the other samples phi2 on the rising edge of phi1
// (phi2_first). So phi1_first is 1 when phi1 was already high when phi2 rose,
// and the reverse. Outputs, as published:
//   phi1 rises first  -> 1 0      phi2 rises first -> 0 1
//   rise together     -> 0 0      invalid          -> 1 1
// The model adds the real flip-flops' aperture: a data input counts as high
// only if it rose more than DEAD_ZONE_PS before the clocking edge, so edges
// 100 ps apart or closer read as "together", as published. Metastability
// (the published 2.24 ns resolving time) is not modelled. Each flag is
// updated 1 fs after its clocking edge, so that two edges at the same instant
// are judged with both rise times known. Both flags start at 0.
module phase_detector #(
  parameter real DEAD_ZONE_PS = 100.0
) (
  input  logic phi1,
  input  logic phi2,
  output logic phi1_first,
  output logic phi2_first
);
  timeunit 1ps; timeprecision 1fs;

  real t_rise1 = -1.0e9;
  real t_rise2 = -1.0e9;

  initial begin
    phi1_first = 1'b0;
    phi2_first = 1'b0;
  end

  // Flip-flop clocked by phi1, data phi2.
  always @(posedge phi1) begin
    automatic real t = $realtime;
    t_rise1 = t;
    #0.001;
    phi2_first <= phi2 && ((t - t_rise2) > DEAD_ZONE_PS);
  end

  // Flip-flop clocked by phi2, data phi1.
  always @(posedge phi2) begin
    automatic real t = $realtime;
    t_rise2 = t;
    #0.001;
    phi1_first <= phi1 && ((t - t_rise1) > DEAD_ZONE_PS);
  end

endmodule
