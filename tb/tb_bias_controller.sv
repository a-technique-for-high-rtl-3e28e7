// tb_bias_controller: checks that the bias controller holds its replica
// divider at mid-supply by moving V_DN against V_DP.
//
// Steps V_DP to random levels between 0.5 V and 3.5 V and, after 300 ns, checks
// V_DN against the balance point VDD - V_DP (within 10 mV), V_div against
// VDD/2 (within 50 mV) and that the comparator is dithering around the
// balance rather than stuck. Each step down in V_DP must raise V_DN and each
// step up must lower it. Then ramps V_DP at 2 V/us and checks V_DN tracks it
// within 20 mV.
module tb_bias_controller;
  timeunit 1ps; timeprecision 1fs;

  real v_dp = 2.5, v_dn, v_div;
  logic cmp_high;
  int checks = 0, failures = 0;
  int toggles = 0;

  bias_controller dut (.*);

  always @(cmp_high) toggles++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic real absr(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real prev_dp, prev_dn;
    #300000;
    check(absr(v_dn - 2.5) < 0.01, $sformatf("start: v_dn %0.3f at v_dp 2.5", v_dn));
    for (int i = 0; i < 10; i++) begin
      prev_dp = v_dp; prev_dn = v_dn;
      v_dp = 0.5 + 3.0 * real'($urandom_range(1000)) / 1000.0;
      toggles = 0;
      #300000;
      check(absr(v_dn - (5.0 - v_dp)) < 0.01, $sformatf("v_dp %0.3f: v_dn %0.3f, expected %0.3f", v_dp, v_dn, 5.0 - v_dp));
      check(absr(v_div - 2.5) < 0.05, $sformatf("v_dp %0.3f: v_div %0.3f", v_dp, v_div));
      check(toggles > 10, $sformatf("comparator stuck (%0d toggles)", toggles));
      if (absr(v_dp - prev_dp) > 0.05)
        check((v_dp < prev_dp) == (v_dn > prev_dn), $sformatf("v_dn moved the wrong way: v_dp %0.3f->%0.3f, v_dn %0.3f->%0.3f",
                                                              prev_dp, v_dp, prev_dn, v_dn));
    end
    // Slow ramp from 1 V to 3 V.
    v_dp = 1.0;
    #300000;
    for (int i = 0; i < 100; i++) begin
      v_dp = v_dp + 0.02;
      #10000;
      check(absr(v_dn - (5.0 - v_dp)) < 0.02, $sformatf("ramp: v_dp %0.3f, v_dn %0.3f", v_dp, v_dn));
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
