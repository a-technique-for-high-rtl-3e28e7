// compensation_delay: behavioural model of the off-chip-controlled variable
// delay at the end of the dummy chain.
//
// It makes up for the wiring mismatch between the dummy chain and the clock
// chain on their way to the data DLL, and is calibrated to equal four data
// delay elements (2 ns nominal), so that dummy chain plus compensation act as
// 16 data delays. The model delays din by delay_ps (transport delay);
// delay_ps stands for the off-chip control, whose form is not published.
module compensation_delay
  import pg_delay_pkg::*;
(
  input  logic din,
  input  real  delay_ps,
  output logic dout
);
  timeunit 1ps; timeprecision 1fs;

  initial dout = 1'b0;

  always begin
    @(din);
    fork
      begin
        automatic logic        v = din;
        automatic logic [23:0] n = ps_to_fs(delay_ps);
        wait_fs(n);
        dout = v;
      end
    join_none
  end

endmodule
