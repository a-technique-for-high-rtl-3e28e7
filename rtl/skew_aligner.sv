// skew_aligner: the flip-flop array between the pattern memory and the
// generator stages that keeps all 64 edges of one word on the same clock
// pulse.
//
// Four clock pulses travel down the 64-stage clock chain at once, one per
// 16-stage section, and the pulse now in section k (k = 0..3) was launched k
// periods ago. Bits of one memory word must therefore reach section k k
// periods late. Section k gets k layers of D flip-flops clocked on the
// falling edge of the clock (the opposite phase, which gives the first half
// of each section its setup time). The second half of every section (stages
// 9..16 of the section) gets one more flip-flop on the rising edge, because
// the pulse is only halfway through the section when the next falling edge
// comes. The layer counts (0, 1, 2, 3 falling-edge layers; one rising-edge
// layer on every second half) follow the published latch arrangement.
//
// Interface: t_mem changes on falling edges (pattern_memory). t_gen bit s
// drives the T input of stage s+1. First-half bits of section k change on
// falling edges, second-half bits on rising edges. Latency from t_mem to
// t_gen is k falling edges (first half), plus the next rising edge (second
// half). The asynchronous reset is this design's addition so that a fresh
// chip inserts no stray edges.
module skew_aligner
  import pg_pkg::*;
#(
  parameter int unsigned STAGES   = N_STAGES,
  parameter int unsigned SECTIONS = N_SECTIONS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [STAGES-1:0] t_mem,
  output logic [STAGES-1:0] t_gen
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned LEN  = STAGES / SECTIONS;
  localparam int unsigned HALF = LEN / 2;

  for (genvar k = 0; k < SECTIONS; k++) begin : g_sec
    logic [LEN-1:0]  skewed;
    logic [HALF-1:0] second_half_q;

    if (k == 0) begin : g_direct
      assign skewed = t_mem[k*LEN +: LEN];
    end else begin : g_skew
      logic [LEN-1:0] pipe [k];
      always_ff @(negedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < k; i++) pipe[i] <= '0;
        end else begin
          pipe[0] <= t_mem[k*LEN +: LEN];
          for (int i = 1; i < k; i++) pipe[i] <= pipe[i-1];
        end
      end
      assign skewed = pipe[k-1];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) second_half_q <= '0;
      else        second_half_q <= skewed[LEN-1:HALF];
    end

    assign t_gen[k*LEN +: HALF]        = skewed[HALF-1:0];
    assign t_gen[k*LEN + HALF +: HALF] = second_half_q;
  end

endmodule
