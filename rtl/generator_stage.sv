// generator_stage: behavioural model of one stage of the matched delay
// generator.
//
// A stage holds a rising-edge T flip-flop, two delay elements on the clock
// line (delta_C, nominal 400 ps) and, on the data line, a differential XOR
// followed by two delay elements (delta_X, nominal 500 ps). The flip-flop is
// clocked by the clock as it enters the stage; when t is 1 it toggles, which
// flips the XOR output and so inserts an edge into the data passing through.
// When it does not toggle the XOR simply passes the upstream data on after
// delta_X (inverted or not, by the flip-flop's state). This structure is the
// published stage; the flip-flop is synthesizable (t_flip_flop), the delays
// are timing models. v_dp_clk and v_dp_data are the bias voltages set by the
// clock and data DLLs. The complement clock input is passed along only as a
// port, since the model derives every complement from its true signal.
module generator_stage
  import pg_pkg::*;
(
  input  logic rst_n,
  input  logic t,
  input  logic clk_in,
  input  logic clk_in_n,
  input  logic data_in,
  input  logic data_in_n,
  input  real  v_dp_clk,
  input  real  v_dp_data,
  output logic clk_out,
  output logic clk_out_n,
  output logic data_out,
  output logic data_out_n,
  output logic q           // flip-flop state, for observation
);
  timeunit 1ps; timeprecision 1fs;

  logic q_n;
  logic c_mid, c_mid_n;
  logic x, x_n, d_mid, d_mid_n;

  t_flip_flop u_tff (.clk(clk_in), .rst_n(rst_n), .t(t), .q(q), .q_n(q_n));

  delay_element u_clk_d0 (.din(clk_in), .din_n(clk_in_n), .v_dp(v_dp_clk),
                          .dout(c_mid), .dout_n(c_mid_n));
  delay_element u_clk_d1 (.din(c_mid), .din_n(c_mid_n), .v_dp(v_dp_clk),
                          .dout(clk_out), .dout_n(clk_out_n));

  diff_xor u_xor (.a(data_in), .a_n(data_in_n), .b(q), .b_n(q_n),
                  .x(x), .x_n(x_n));
  delay_element u_dat_d0 (.din(x), .din_n(x_n), .v_dp(v_dp_data),
                          .dout(d_mid), .dout_n(d_mid_n));
  delay_element u_dat_d1 (.din(d_mid), .din_n(d_mid_n), .v_dp(v_dp_data),
                          .dout(data_out), .dout_n(data_out_n));

endmodule
