// tb_output_driver: checks a probe-pad driver (1.2 ns minimum pulse): pulses
// of 1.2 ns and longer come through with their width and a 0.9 ns delay,
// pulses of 0.5 ns are dropped, and a disabled driver does not switch.
module tb_output_driver;
  timeunit 1ps; timeprecision 1fs;

  logic din = 1'b0, enable = 1'b1, dout, dout_n;
  int checks = 0, failures = 0;
  realtime edges [$];

  output_driver #(.MIN_PULSE_PS(1200.0)) dut (.*);

  always @(dout) edges.push_back($realtime);

  task automatic pulse(input real w, input int exp_edges, input string what);
    realtime t0;
    #5000 edges.delete();
    t0 = $realtime; din = 1'b1; #(w) din = 1'b0; #5000;
    checks++;
    if (edges.size() != exp_edges) begin
      failures++; $display("FAIL %s: %0d edges exp %0d", what, edges.size(), exp_edges);
    end else if (exp_edges == 2) begin
      checks++;
      if ((edges[0] - t0) < 899.99 || (edges[0] - t0) > 900.01 ||
          (edges[1] - edges[0]) < w - 0.01 || (edges[1] - edges[0]) > w + 0.01) begin
        failures++; $display("FAIL %s timing %0.3f %0.3f", what, edges[0] - t0, edges[1] - edges[0]);
      end
    end
    checks++;
    if (dout !== 1'b0 || dout_n !== 1'b1) begin failures++; $display("FAIL %s rest level", what); end
  endtask

  initial begin
    pulse(1200.0, 2, "1.2 ns pulse");
    pulse(1300.0, 2, "1.3 ns pulse");
    pulse(4000.0, 2, "4 ns pulse");
    pulse(500.0, 0, "0.5 ns pulse dropped");
    enable = 1'b0;
    pulse(4000.0, 0, "disabled");
    enable = 1'b1;
    pulse(2000.0, 2, "re-enabled");
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
