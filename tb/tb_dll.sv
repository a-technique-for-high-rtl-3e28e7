// tb_dll: closed-loop test of one DLL (detector, control logic, pump) with a
// loop filter and a controlled delay standing in for 16 clock stages:
// delay = 16 * (300 ps + 40 ps/V * v). The loop must settle where the delayed
// clock lines up with the next clock edge (16 delta_C = T = 6.4 ns, i.e.
// v = 2.5 V) to within the detector's 100 ps window, from below and from
// above; with enable = 0 the bias must stay put.
module tb_dll;
  timeunit 1ps; timeprecision 1fs;

  localparam real HALF = 3200.0;

  logic clk = 1'b0, enable = 1'b1, delayed;
  real v_add_bias = 2.5, v_rmv_bias = 2.5, v, rate, line_ps;
  logic p1f, p2f, add, rmv;
  int checks = 0, failures = 0, n_add = 0, n_rmv = 0;

  always #(HALF) clk = ~clk;

  assign line_ps = 16.0 * (300.0 + 40.0 * v);

  compensation_delay u_line (.din(clk), .delay_ps(line_ps), .dout(delayed));

  dll dut (.enable(enable), .phi1(clk), .phi2(delayed), .v_add_bias(v_add_bias),
           .v_rmv_bias(v_rmv_bias), .phi1_first(p1f), .phi2_first(p2f), .add(add), .rmv(rmv),
           .rate_v_per_us(rate));

  // The filter; its start voltage is forced by the test through a hierarchical write.
  loop_filter #(.V_INIT(1.5)) u_filt (.rate_a_v_per_us(rate), .rate_b_v_per_us(0.0), .v_out(v));

  always @(posedge add) n_add++;
  always @(posedge rmv) n_rmv++;

  task automatic chk_lock(input string what);
    checks++;
    if (line_ps < 6400.0 - 110.0 || line_ps > 6400.0 + 110.0) begin
      failures++; $display("FAIL %s: line %0.1f ps, v %0.3f", what, line_ps, v);
    end
  endtask

  initial begin
    #(1500000.0); chk_lock("lock from 1.5 V");
    checks++; if (n_add == 0) begin failures++; $display("FAIL no add"); end
    u_filt.v = 3.6;
    #(1500000.0); chk_lock("lock from 3.6 V");
    checks++; if (n_rmv == 0) begin failures++; $display("FAIL no rmv"); end
    enable = 1'b0;
    u_filt.v = 2.0;
    #(500000.0);
    checks++;
    if (v < 1.999 || v > 2.001) begin failures++; $display("FAIL disabled DLL moved v to %0.3f", v); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10000000.0);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
