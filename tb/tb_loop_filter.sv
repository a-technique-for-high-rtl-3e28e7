// tb_loop_filter: checks the integrating loop filter: it starts at V_INIT,
// holds with no pump current, rises and falls at the summed rates
// (2 V/us for 100 ns = 0.2 V), and clamps at 0 V and VDD. Then 30 random
// intervals of 20..120 ns with random rates on both inputs, each checked
// against an independently accumulated voltage, clamped to 0..VDD.
module tb_loop_filter;
  timeunit 1ps; timeprecision 1fs;

  real rate_a_v_per_us = 0.0, rate_b_v_per_us = 0.0, v_out;
  int checks = 0, failures = 0;

  loop_filter #(.V_INIT(1.5), .STEP_PS(50.0)) dut (.*);

  task automatic chk(input real exp, input real tol, input string what);
    checks++;
    if (v_out < exp - tol || v_out > exp + tol) begin
      failures++; $display("FAIL %s: v_out %0.5f exp %0.5f", what, v_out, exp);
    end
  endtask

  initial begin
    #25; chk(1.5, 1.0e-9, "initial");
    #100000; chk(1.5, 1.0e-9, "hold");
    rate_a_v_per_us = 2.0; #100000; chk(1.7, 0.001, "charge");
    rate_a_v_per_us = 0.0; rate_b_v_per_us = -1.0; #200000; chk(1.5, 0.001, "discharge");
    rate_a_v_per_us = 1.0; rate_b_v_per_us = 1.0; #100000; chk(1.7, 0.001, "sum of pumps");
    rate_a_v_per_us = 6.0; rate_b_v_per_us = 6.0; #1000000; chk(5.0, 1.0e-9, "clamp high");
    rate_a_v_per_us = -6.0; rate_b_v_per_us = -6.0; #1000000; chk(0.0, 1.0e-9, "clamp low");
    begin
      real expv = 0.0;
      for (int i = 0; i < 30; i++) begin
        real ra = real'($urandom_range(6000)) / 1000.0 - 3.0;
        real rb = real'($urandom_range(6000)) / 1000.0 - 3.0;
        int  dur = 20000 + 1000 * $urandom_range(100);
        rate_a_v_per_us = ra; rate_b_v_per_us = rb;
        #(dur);
        expv = expv + (ra + rb) * dur * 1.0e-6;
        if (expv < 0.0) expv = 0.0;
        if (expv > 5.0) expv = 5.0;
        chk(expv, 0.002, $sformatf("random interval %0d", i));
      end
    end
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
