// output_driver: behavioural model of one output buffer chain (package pin or
// probe pad).
//
// The real drivers are chains of sized single-ended buffers whose bandwidth
// is limited by their load: about 80 Mb/s into a 200 pF package pin, and
// 833 Mb/s into the 10 pF probe pads. The model is an inertial filter: a
// level must last at least 3/4 of MIN_PULSE_PS to reach the output, which
// then follows the input 3/4 * MIN_PULSE_PS later; shorter pulses are lost,
// as they are attenuated in the real driver. That rejection threshold is this
// design's choice. enable = 0 stops switching: the output parks at 0 (dout_n
// at 1), as the published drivers can be disabled to cut their noise. One
// driver per output polarity exists on the chip; here dout_n is derived.
module output_driver
  import pg_delay_pkg::*;
#(
  parameter real MIN_PULSE_PS = 1200.0
) (
  input  logic din,
  input  logic enable,
  output logic dout,
  output logic dout_n
);
  timeunit 1ps; timeprecision 1fs;

  localparam logic [23:0] FILTER_FS = ps_to_fs(MIN_PULSE_PS * 0.75);

  logic        gated;
  int unsigned change_id = 0;

  assign gated = din & enable;

  initial dout = 1'b0;

  always begin
    @(gated);
    change_id = change_id + 1;
    fork
      begin
        automatic int unsigned id = change_id;
        automatic logic        v  = gated;
        wait_fs(FILTER_FS);
        if (id == change_id) dout = v;
      end
    join_none
  end

  assign dout_n = ~dout;

endmodule
