// diff_xor: behavioural model of the differential XOR gate of the data chain.
//
// A timing model of an analog gate: x follows a XOR b after DELAY_PS
// picoseconds (transport delay, so a change on either input always produces
// an output transition). x_n is the complement. The XOR's own biases V_XP and
// V_XN are meant to stay fixed in operation, so the delay is a parameter; its
// 100 ps default is this design's split of the nominal 500 ps data stage delay
// (XOR plus two 200 ps delay elements). The complement inputs are taken to be
// exact inverses and are not looked at.
module diff_xor
  import pg_pkg::*;
  import pg_delay_pkg::*;
#(
  parameter real DELAY_PS = XOR_DELAY_PS
) (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic x,
  output logic x_n
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [23:0] N_FS = ps_to_fs(DELAY_PS);

  initial x = 1'b0;

  always begin
    @(a or b);
    fork
      begin
        automatic logic v = a ^ b;
        wait_fs(N_FS);
        x = v;
      end
    join_none
  end

  assign x_n = ~x;

endmodule
