// delay_element: behavioural model of the differential, bias-controlled delay
// element used in both the clock and the data delay chains.
//
// This is a timing model, not synthesizable logic: the real part is an analog
// differential stage. Every transition of din reappears on dout after
// elem_delay_ps(v_dp) picoseconds, where v_dp is the PMOS bias at the moment
// the transition enters (150 ps + 20 ps/V * V_DP, clamped to 0..5 V). Delay is
// transport: pulses narrower than the delay pass unchanged. dout_n is the
// exact complement of dout; din_n is taken to be the complement of din and is
// not looked at. The NMOS bias V_DN is not a port: the published automatic
// bias controller derives it from V_DP, so V_DP alone sets the delay. That the
// delay rises with V_DP is published; the linear law and its coefficients are
// chosen to give the published 300..500 ps range for two elements.
module delay_element
  import pg_pkg::*;
  import pg_delay_pkg::*;
(
  input  logic din,
  input  logic din_n,
  input  real  v_dp,
  output logic dout,
  output logic dout_n
);
  timeunit 1ps; timeprecision 1fs;

  initial dout = 1'b0;

  always begin
    @(din);
    fork
      begin
        automatic logic        v = din;
        automatic logic [23:0] n = ps_to_fs(elem_delay_ps(v_dp));
        wait_fs(n);
        dout = v;
      end
    join_none
  end

  assign dout_n = ~dout;

endmodule
