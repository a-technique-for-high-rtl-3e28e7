// dummy_delay_chain: behavioural model of the dummy chain of data delay
// elements that gives the data DLL a reference it can see.
//
// The data chain itself carries unknown data and cannot be phase-locked, so a
// copy of it, LEN data delay elements long (each an XOR with its second input
// held at 0 followed by two delay elements, i.e. one delta_X), is driven by
// the generator clock. Its output, after a further compensation delay worth
// four elements, is compared with the clock chain's 20th tap: since
// 16 * 500 ps = 20 * 400 ps, the DLL then sets delta_X. LEN = 12 is published;
// building each element exactly like a stage's data path is this design's
// reading of "data delay element".
module dummy_delay_chain
  import pg_pkg::*;
#(
  parameter int unsigned LEN = 12
) (
  input  logic din,
  input  real  v_dp_data,
  output logic dout
);
  timeunit 1ps; timeprecision 1fs;

  logic [LEN:0] c, c_n;
  assign c[0]   = din;
  assign c_n[0] = ~din;

  for (genvar i = 0; i < LEN; i++) begin : g_elem
    logic x, x_n, m, m_n;
    diff_xor u_xor (.a(c[i]), .a_n(c_n[i]), .b(1'b0), .b_n(1'b1),
                    .x(x), .x_n(x_n));
    delay_element u_d0 (.din(x), .din_n(x_n), .v_dp(v_dp_data),
                        .dout(m), .dout_n(m_n));
    delay_element u_d1 (.din(m), .din_n(m_n), .v_dp(v_dp_data),
                        .dout(c[i+1]), .dout_n(c_n[i+1]));
  end

  assign dout = c[LEN];

endmodule
