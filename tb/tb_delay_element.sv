// tb_delay_element: checks the bias-controlled delay element: delay at three
// bias values against 150 ps + 20 ps/V * V_DP, equal delay for rising and
// falling edges, transport of a pulse narrower than the delay, clamping of
// the bias outside 0..5 V, and the complement output.
module tb_delay_element;
  timeunit 1ps; timeprecision 1fs;

  logic din = 1'b0, dout, dout_n;
  real  v_dp = 2.5;
  int checks = 0, failures = 0;
  real t_in, t_out;
  realtime edges [$];

  delay_element dut (.din(din), .din_n(~din), .v_dp(v_dp), .dout(dout), .dout_n(dout_n));

  always @(dout) edges.push_back($realtime);

  task automatic expect_near(input real got, input real exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++; $display("FAIL %s: got %0.3f exp %0.3f", what, got, exp);
    end
  endtask

  initial begin
    real vs [5] = '{0.0, 2.5, 5.0, -1.0, 7.0};
    real ex [5] = '{150.0, 200.0, 250.0, 150.0, 250.0};
    #1000;
    for (int i = 0; i < 5; i++) begin
      v_dp = vs[i];
      for (int e = 0; e < 2; e++) begin
        edges.delete();
        t_in = $realtime; din = ~din;
        #1000;
        checks++;
        if (edges.size() != 1) begin failures++; $display("FAIL edge count %0d", edges.size()); end
        else expect_near(edges[0] - t_in, ex[i], $sformatf("delay v=%0.1f edge %0d", vs[i], e));
        checks++;
        if (dout_n !== ~dout || dout !== din) begin failures++; $display("FAIL levels"); end
      end
    end
    // A 50 ps pulse through a 200 ps delay survives with its width.
    v_dp = 2.5; edges.delete();
    t_in = $realtime; din = 1'b1; #50 din = 1'b0;
    #1000;
    checks++;
    if (edges.size() != 2) begin failures++; $display("FAIL narrow pulse lost (%0d edges)", edges.size()); end
    else begin
      expect_near(edges[0] - t_in, 200.0, "narrow pulse lead");
      expect_near(edges[1] - edges[0], 50.0, "narrow pulse width");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
