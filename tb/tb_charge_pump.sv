// tb_charge_pump: checks the pump's signed rate: zero when idle, the maximum
// 5 V/us charging at v_add_bias = 0, slower charging as v_add_bias rises, no
// charging at VDD - VTH; discharge growing with v_rmv_bias; add with rmv
// cancelling. Reference: linear law between the limits (VDD 5 V, VTH 1 V).
module tb_charge_pump;
  timeunit 1ps; timeprecision 1fs;

  logic add = 1'b0, rmv = 1'b0;
  real v_add_bias = 0.0, v_rmv_bias = 5.0, rate_v_per_us;
  int checks = 0, failures = 0;

  charge_pump dut (.*);

  function automatic real ref_up(input real b);
    real r = 5.0 * (4.0 - b) / 4.0;
    return r < 0.0 ? 0.0 : (r > 5.0 ? 5.0 : r);
  endfunction
  function automatic real ref_dn(input real b);
    real r = 5.0 * (b - 1.0) / 4.0;
    return r < 0.0 ? 0.0 : (r > 5.0 ? 5.0 : r);
  endfunction

  task automatic chk(input real exp, input string what);
    #10;
    checks++;
    if (rate_v_per_us < exp - 1.0e-6 || rate_v_per_us > exp + 1.0e-6) begin
      failures++; $display("FAIL %s: rate %0.4f exp %0.4f", what, rate_v_per_us, exp);
    end
  endtask

  initial begin
    chk(0.0, "idle");
    add = 1'b1; v_add_bias = 0.0; chk(5.0, "max charge");
    v_add_bias = 2.5; chk(1.875, "charge at 2.5 V");
    v_add_bias = 4.0; chk(0.0, "charge cut off");
    add = 1'b0; rmv = 1'b1; v_rmv_bias = 5.0; chk(-5.0, "max discharge");
    v_rmv_bias = 2.5; chk(-1.875, "discharge at 2.5 V");
    v_rmv_bias = 0.5; chk(0.0, "discharge cut off");
    add = 1'b1; v_add_bias = 2.5; v_rmv_bias = 2.5; chk(0.0, "both cancel");
    for (int i = 0; i < 50; i++) begin
      real ba = real'($urandom_range(500)) / 100.0, br = real'($urandom_range(500)) / 100.0;
      {add, rmv} = 2'($urandom);
      v_add_bias = ba; v_rmv_bias = br;
      chk((add ? ref_up(ba) : 0.0) - (rmv ? ref_dn(br) : 0.0), "random");
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
