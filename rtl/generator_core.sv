// generator_core: behavioural model of the 64-stage matched delay generator.
//
// The clock enters stage 1 and ripples down a chain of clock delays, one
// delta_C per stage; the serial data starts at a constant 0 (the first XOR's
// upstream input is grounded) and ripples down a chain of XOR + data delays,
// one delta_X per stage. Stage j is clocked (j-1)*delta_C after the clock
// edge; if its T bit is 1 its edge leaves the generator
// (j-1)*delta_C + (65-j)*delta_X later. Because delta_X > delta_C, stage 64's
// edge comes out first and stage 1's last, adjacent stages' edges being
// delta_X - delta_C = 100 ps apart. With a 6.4 ns clock the 64 edges of one
// pulse fill exactly one period, so consecutive pulses join seamlessly. Four
// pulses are in the clock chain at once; t_bits must be skewed per section
// (skew_aligner) so that one memory word is played by one pulse.
//
// Ports: clk_tap[k] is the clock after k stage delays (clk_tap[0] = clk),
// used by the DLLs; data_tap[j-1] is the data after stage j; data_out is the
// output of stage 64. The structure follows the published generator; the
// delay values come from the delay element and XOR models.
module generator_core
  import pg_pkg::*;
#(
  parameter int unsigned STAGES = N_STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [STAGES-1:0] t_bits,
  input  real               v_dp_clk,
  input  real               v_dp_data,
  output logic              data_out,
  output logic              data_out_n,
  output logic [STAGES:0]   clk_tap,
  output logic [STAGES-1:0] data_tap,
  output logic [STAGES-1:0] tff_q
);
  timeunit 1ps; timeprecision 1fs;

  logic [STAGES:0] clk_tap_n;
  logic [STAGES:0] dchain, dchain_n;

  assign clk_tap[0]   = clk;
  assign clk_tap_n[0] = ~clk;
  assign dchain[0]    = 1'b0;
  assign dchain_n[0]  = 1'b1;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    generator_stage u_stage (
      .rst_n      (rst_n),
      .t          (t_bits[s]),
      .clk_in     (clk_tap[s]),
      .clk_in_n   (clk_tap_n[s]),
      .data_in    (dchain[s]),
      .data_in_n  (dchain_n[s]),
      .v_dp_clk   (v_dp_clk),
      .v_dp_data  (v_dp_data),
      .clk_out    (clk_tap[s+1]),
      .clk_out_n  (clk_tap_n[s+1]),
      .data_out   (dchain[s+1]),
      .data_out_n (dchain_n[s+1]),
      .q          (tff_q[s])
    );
  end

  assign data_tap   = dchain[STAGES:1];
  assign data_out   = dchain[STAGES];
  assign data_out_n = dchain_n[STAGES];

endmodule
