// t_flip_flop: rising-edge toggle flip-flop of one generator stage.
//
// On each rising edge of clk, q inverts when t is 1 and holds when t is 0.
// q and q_n form the differential pair fed to the stage's XOR. In the
// generator, clk is the stage's tap on the clock delay chain, so the 64
// flip-flops are clocked one clock-element delay apart. The asynchronous
// active-low reset is this design's addition; the published stage has none.
module t_flip_flop (
  input  logic clk,
  input  logic rst_n,
  input  logic t,
  output logic q,
  output logic q_n
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (t)  q <= ~q;
  end

  assign q_n = ~q;

endmodule
