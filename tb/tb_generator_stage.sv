// tb_generator_stage: checks one generator stage: clock delay (two elements,
// 400 ps at 2.5 V and 340 ps at 1.0 V), data pass-through delay (XOR plus two
// elements, 500 ps at 2.5 V), the T flip-flop toggling only on rising clock
// edges with t = 1, and the inserted edge leaving delta_X after the clock.
module tb_generator_stage;
  timeunit 1ps; timeprecision 1fs;

  logic rst_n = 1'b1, t = 1'b0, clk_in = 1'b0, data_in = 1'b0;
  logic clk_out, clk_out_n, data_out, data_out_n, q;
  real  v_dp_clk = 2.5, v_dp_data = 2.5;
  int checks = 0, failures = 0;
  realtime c_edges [$], d_edges [$];

  generator_stage dut (
    .rst_n(rst_n), .t(t), .clk_in(clk_in), .clk_in_n(~clk_in),
    .data_in(data_in), .data_in_n(~data_in), .v_dp_clk(v_dp_clk), .v_dp_data(v_dp_data),
    .clk_out(clk_out), .clk_out_n(clk_out_n), .data_out(data_out), .data_out_n(data_out_n), .q(q));

  always @(clk_out)  c_edges.push_back($realtime);
  always @(data_out) d_edges.push_back($realtime);

  task automatic near(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++; $display("FAIL %s: got %0.3f exp %0.3f", what, got, exp);
    end
  endtask

  task automatic count(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d edges, exp %0d", what, got, exp); end
  endtask

  initial begin
    realtime t0;
    #1 rst_n = 1'b0; #10 rst_n = 1'b1;
    #2000; c_edges.delete(); d_edges.delete();
    // Clock delay at two biases, no toggling.
    t0 = $realtime; clk_in = 1'b1; #1000 clk_in = 1'b0; #1000;
    count(c_edges.size(), 2, "clock 2.5V"); count(d_edges.size(), 0, "no data edge, t=0");
    if (c_edges.size() == 2) begin near(c_edges[0] - t0, 400.0, "delta_C 2.5V rise");
                                   near(c_edges[1] - t0, 1400.0, "delta_C 2.5V fall"); end
    v_dp_clk = 1.0; c_edges.delete();
    t0 = $realtime; clk_in = 1'b1; #1000 clk_in = 1'b0; #1000;
    if (c_edges.size() == 2) near(c_edges[0] - t0, 340.0, "delta_C 1.0V");
    else count(c_edges.size(), 2, "clock 1.0V");
    v_dp_clk = 2.5;
    // Data pass-through.
    d_edges.delete();
    t0 = $realtime; data_in = 1'b1; #2000;
    count(d_edges.size(), 1, "pass-through");
    if (d_edges.size() == 1) near(d_edges[0] - t0, 500.0, "delta_X pass-through");
    checks++; if (data_out !== 1'b1 || data_out_n !== 1'b0) begin failures++; $display("FAIL level"); end
    // Toggle on a rising clock edge with t = 1.
    t = 1'b1; d_edges.delete();
    t0 = $realtime; clk_in = 1'b1; #1000;
    checks++; if (q !== 1'b1) begin failures++; $display("FAIL q did not toggle"); end
    clk_in = 1'b0; #2000;
    count(d_edges.size(), 1, "inserted edge");
    if (d_edges.size() == 1) near(d_edges[0] - t0, 500.0, "inserted edge delta_X after clock");
    checks++; if (data_out !== 1'b0) begin failures++; $display("FAIL data after toggle"); end
    // t = 0: no toggle.
    t = 1'b0; d_edges.delete();
    clk_in = 1'b1; #1000 clk_in = 1'b0; #2000;
    count(d_edges.size(), 0, "t=0 no edge");
    checks++; if (q !== 1'b1) begin failures++; $display("FAIL q changed with t=0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
