// pattern_memory: the on-chip pattern store, one 8-bit circular FIFO per
// generator stage (64 x 8 bits in all).
//
// Each bit is an edge flag: a 1 in FIFO j, word w, puts a transition into the
// output at the 100 ps slot that stage j owns in clock period w. The data to
// send must therefore be transition-encoded before it is loaded.
//
// Operation (all on the FALLING edge of clk):
//   * run = 0: the FIFOs hold, t_bits is forced to 0 so the generator makes no
//     edges, and load_en = 1 shifts load_row into the tail of every FIFO at
//     once (bit j of load_row goes to FIFO j). Eight loads fill the memory; the
//     first row loaded is the first word played.
//   * run = 1: every FIFO presents its head bit on t_bits and rotates by one
//     position, so the 8 words repeat with a period of 8 clocks.
// Loading while running is ignored: the pattern can only be changed with the
// generator disabled, as in the published chip.
//
// The falling-edge timing is this design's reading of the skew scheme: the
// first half of section 1 takes memory bits with no flip-flop in between and
// must see them stable from the rising edge onward, so the memory has to
// change half a period earlier, on the opposite phase like the other skew
// flip-flops. The load port and the forced-zero output while idle are this
// design's choices; the published storage cell is not described.
module pattern_memory
  import pg_pkg::*;
#(
  parameter int unsigned STAGES = N_STAGES,
  parameter int unsigned DEPTH  = FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,     // asynchronous, clears t_bits only
  input  logic              run,       // 1: play the pattern
  input  logic              load_en,   // shift load_row in (only when run = 0)
  input  logic [STAGES-1:0] load_row,
  output logic [STAGES-1:0] t_bits     // to the skew flip-flops / stages
);
  timeunit 1ps; timeprecision 1fs;

  logic [DEPTH-1:0] fifo [STAGES];

  always_ff @(negedge clk) begin
    for (int s = 0; s < STAGES; s++) begin
      if (run) begin
        fifo[s] <= {fifo[s][0], fifo[s][DEPTH-1:1]};
      end else if (load_en) begin
        fifo[s] <= {load_row[s], fifo[s][DEPTH-1:1]};
      end
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_bits <= '0;
    end else begin
      for (int s = 0; s < STAGES; s++) begin
        t_bits[s] <= run ? fifo[s][0] : 1'b0;
      end
    end
  end

endmodule
