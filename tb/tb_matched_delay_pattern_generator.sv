// tb_matched_delay_pattern_generator: end-to-end test of the whole generator
// at its default size (64 stages, 8-word FIFOs, 6.4 ns clock).
//
// Sequence: reset; load 8 rows while idle; lock the clock chain with the
// coarse DLL (taps 0/16), switch to the fine DLL (taps 0/64) while the data
// DLL locks delta_X; then play the pattern for 3 turns of the memory, stop,
// and play again with the probe driver disabled.
//
// The pattern is built in time order on the 512-slot grid of one memory turn
// (slot s = word s/64, stage 64 - s%64): first two 12-slot pulses and two
// 13-slot pulses (1.2 ns / 1.3 ns at 100 ps slots), then random gaps of 12 to
// 40 slots, every gap (the wrap-around one too) at least 12 slots.
//
// Checks: lock of each loop, measured from tap timing (the clock pulse at
// tap 16 within 110 ps of a clock edge, at tap 64 likewise, the dummy chain
// plus compensation delay within 110 ps of tap 20); the resolution
// delta_X - delta_C within 100 ps +- 10 ps; every on-chip output edge at
// launch + w*T + (j-1)*delta_C + (65-j)*delta_X for word w, stage j, with the
// delays measured from the taps (so the check is independent of the model's
// bias law); the probe output repeating every on-chip edge 0.9 ns later; the
// pin output dropping the narrow pulses; no edges once the generator is
// stopped; none on a disabled probe driver.
// Mechanisms counted (each must happen): coarse add, fine correction, data
// DLL correction, coarse-to-fine switch, loads, FIFO wrap, stop, driver
// disable, pin-driver pulse rejection, V_DN tracking by both bias
// controllers (V_DN + V_DP = VDD within 20 mV after lock).
module tb_matched_delay_pattern_generator;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 64, DEPTH = 8, SLOTS = N * DEPTH;
  localparam real T = 6400.0, HALF = 3200.0;

  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0, load_en = 1'b0, dll_fine_sel = 1'b0;
  logic [N-1:0] load_row = '0;
  real v_add_bias = 2.5, v_rmv_bias = 2.5, comp_delay_ps = 2000.0;
  logic pin_en = 1'b1, probe_en = 1'b1;
  logic gen_out, pin_out, pin_out_n, probe_out, probe_out_n;
  real v_dp_clk, v_dp_data, v_dn_clk, v_dn_data;

  matched_delay_pattern_generator dut (.*);

  always #(HALF) clk = ~clk;

  int checks = 0, failures = 0;
  int n_coarse_add = 0, n_fine_corr = 0, n_data_corr = 0, n_switch = 0, n_load = 0;
  int n_wrap = 0, n_stop = 0, n_drv_disable = 0, n_pin_reject = 0, n_bias_track = 0;

  logic [N-1:0] rows [DEPTH];
  int rd_ptr = 0;
  realtime gen_e [$], probe_e [$], pin_e [$];
  realtime t_clk_rise, t_tap16, t_tap20, t_tap64, t_comp;

  always @(gen_out)   gen_e.push_back($realtime);
  always @(probe_out) probe_e.push_back($realtime);
  always @(pin_out)   pin_e.push_back($realtime);
  always @(posedge clk) t_clk_rise = $realtime;
  always @(posedge dut.clk_tap[16]) t_tap16 = $realtime;
  always @(posedge dut.clk_tap[20]) t_tap20 = $realtime;
  always @(posedge dut.clk_tap[64]) t_tap64 = $realtime;
  always @(posedge dut.comp_out)    t_comp  = $realtime;
  always @(posedge dut.c_add) n_coarse_add++;
  always @(posedge dut.f_add or posedge dut.f_rmv) n_fine_corr++;
  always @(posedge dut.x_add or posedge dut.x_rmv) n_data_corr++;

  function automatic real wrap_off(input real x);   // to (-T/2, T/2]
    real y = x;
    while (y > HALF) y -= T;
    while (y <= -HALF) y += T;
    return y;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Offsets of the clock pulse at taps 16 and 64 from the nearest clock edge,
  // and of the dummy reference from tap 20, taken right after a clock edge.
  real x16, x64, x20, dc_meas, dx_meas;
  task automatic measure();
    @(posedge clk); #(HALF);
    x16 = wrap_off(t_tap16 - t_clk_rise);
    x64 = wrap_off(t_tap64 - t_clk_rise);
    x20 = wrap_off(t_comp - t_tap20);
    dc_meas = (4.0 * T + x64) / 64.0;
    dx_meas = (T + wrap_off(t_comp - comp_delay_ps - t_clk_rise)) / 12.0;
  endtask

  // Pattern in time order, then mapped onto FIFO rows.
  task automatic build_pattern();
    int slots [$];
    int s = 0;
    int gaps [4] = '{12, 12, 13, 13};
    logic [N-1:0] r [DEPTH];
    for (int w = 0; w < DEPTH; w++) r[w] = '0;
    slots.push_back(0);
    for (int i = 0; i < 4; i++) begin s += gaps[i]; slots.push_back(s); end
    forever begin
      int g = $urandom_range(40, 12);
      if (s + g > SLOTS - 12) break;
      s += g;
      slots.push_back(s);
    end
    foreach (slots[i]) begin
      int w = slots[i] / N;
      int j = N - (slots[i] % N);     // stage number, 1..64
      r[w][j-1] = 1'b1;
    end
    for (int w = 0; w < DEPTH; w++) rows[w] = r[w];
  endtask

  // Play n words from the memory's current position and check every on-chip edge.
  task automatic play_and_check(input int n_words, input bit check_probe);
    realtime t_launch;
    real exp_t [$];
    int n_gen0, n_probe0, n_pin0;
    gen_e.delete(); probe_e.delete(); pin_e.delete();
    @(posedge clk); run <= 1'b1;
    @(negedge clk);                  // word 0 presented here
    @(posedge clk); t_launch = $realtime;
    repeat (n_words - 1) @(posedge clk);
    run <= 1'b0;
    n_stop++;
    repeat (8) @(posedge clk);       // drain: 5 periods through the chain
    for (int w = 0; w < n_words; w++)
      for (int j = 1; j <= N; j++)
        if (rows[(rd_ptr + w) % DEPTH][j-1])
          exp_t.push_back(t_launch + w * T + (j - 1) * dc_meas + (N + 1 - j) * dx_meas);
    exp_t.sort();
    rd_ptr = (rd_ptr + n_words) % DEPTH;   // the memory resumes where it stopped
    if (n_words > DEPTH) n_wrap += (n_words - 1) / DEPTH;
    checks++;
    if (gen_e.size() != exp_t.size()) begin
      fail($sformatf("on-chip edges %0d, expected %0d", gen_e.size(), exp_t.size()));
    end else begin
      int bad = 0;
      foreach (exp_t[i]) begin
        checks++;
        if (gen_e[i] < exp_t[i] - 2.0 || gen_e[i] > exp_t[i] + 2.0) begin
          bad++;
          if (bad < 5) fail($sformatf("edge %0d at %0.1f, expected %0.1f", i, gen_e[i], exp_t[i]));
          else failures++;
        end
      end
      // First edge: from the first word played, 25.7 ns to 32 ns after launch.
      checks++;
      if (gen_e[0] - t_launch < 25000.0 || gen_e[0] - t_launch > 32500.0)
        fail($sformatf("first edge latency %0.1f ps", gen_e[0] - t_launch));
    end
    if (check_probe) begin
      checks++;
      if (probe_e.size() != gen_e.size()) fail($sformatf("probe edges %0d vs %0d", probe_e.size(), gen_e.size()));
      else foreach (probe_e[i]) begin
        checks++;
        if (probe_e[i] - gen_e[i] < 899.9 || probe_e[i] - gen_e[i] > 900.1)
          fail($sformatf("probe edge %0d delay %0.1f", i, probe_e[i] - gen_e[i]));
      end
    end else begin
      checks++;
      if (probe_e.size() != 0) fail("disabled probe driver switched");
      else n_drv_disable++;
    end
    // Pin driver: 80 Mb/s, so the 1.2..4 ns pulses are too narrow for it.
    checks++;
    if (pin_e.size() >= gen_e.size()) fail("pin driver passed every pulse");
    else n_pin_reject += gen_e.size() - pin_e.size();
    for (int i = 1; i < pin_e.size(); i++) begin
      checks++;
      if (pin_e[i] - pin_e[i-1] < 9375.0 - 0.1) fail("pin pulse narrower than its filter");
    end
    // Stopped: nothing more comes out.
    gen_e.delete();
    repeat (6) @(posedge clk);
    checks++;
    if (gen_e.size() != 0) fail("edges after the generator was stopped");
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #(3 * T) rst_n = 1'b1;
    // Load the pattern memory while idle.
    build_pattern();
    for (int w = 0; w < DEPTH; w++) begin
      @(posedge clk); load_en <= 1'b1; load_row <= rows[w]; n_load++;
    end
    @(posedge clk); load_en <= 1'b0;
    // Coarse clock lock.
    repeat (160) @(posedge clk);
    measure();
    checks++;
    if (x16 < -110.0 || x16 > 110.0) fail($sformatf("coarse DLL: tap 16 off by %0.1f ps", x16));
    // Hand over to the fine DLL.
    dll_fine_sel = 1'b1; n_switch++;
    repeat (160) @(posedge clk);
    measure();
    checks++;
    if (x64 < -110.0 || x64 > 110.0) fail($sformatf("fine DLL: tap 64 off by %0.1f ps", x64));
    checks++;
    if (x20 < -110.0 || x20 > 110.0) fail($sformatf("data DLL: reference off by %0.1f ps", x20));
    checks++;
    if (dc_meas < 398.0 || dc_meas > 402.0) fail($sformatf("delta_C %0.2f ps", dc_meas));
    checks++;
    if (dx_meas - dc_meas < 90.0 || dx_meas - dc_meas > 110.0)
      fail($sformatf("resolution %0.2f ps", dx_meas - dc_meas));
    // Bias controllers: V_DN at the balance point VDD - V_DP of each chain.
    checks++;
    if (v_dn_clk + v_dp_clk < 4.98 || v_dn_clk + v_dp_clk > 5.02)
      fail($sformatf("clock bias controller: V_DP %0.3f, V_DN %0.3f", v_dp_clk, v_dn_clk));
    else n_bias_track++;
    checks++;
    if (v_dn_data + v_dp_data < 4.98 || v_dn_data + v_dp_data > 5.02)
      fail($sformatf("data bias controller: V_DP %0.3f, V_DN %0.3f", v_dp_data, v_dn_data));
    else n_bias_track++;
    $display("locked: delta_C %0.2f ps, delta_X %0.2f ps, resolution %0.2f ps, V_clk %0.3f V, V_data %0.3f V",
             dc_meas, dx_meas, dx_meas - dc_meas, v_dp_clk, v_dp_data);
    // Play three memory turns, then again with the probe driver off.
    play_and_check(3 * DEPTH + 2, 1'b1);
    probe_en = 1'b0;
    play_and_check(DEPTH, 1'b0);
    probe_en = 1'b1;
    // Every mechanism must have happened.
    checks++; if (n_coarse_add == 0) fail("coarse DLL never added charge");
    checks++; if (n_fine_corr == 0)  fail("fine DLL never corrected");
    checks++; if (n_data_corr == 0)  fail("data DLL never corrected");
    checks++; if (n_switch == 0)     fail("no coarse-to-fine switch");
    checks++; if (n_load != DEPTH)   fail("memory not loaded");
    checks++; if (n_wrap == 0)       fail("FIFO never wrapped");
    checks++; if (n_stop == 0)       fail("generator never stopped");
    checks++; if (n_drv_disable == 0) fail("driver never disabled");
    checks++; if (n_pin_reject == 0) fail("pin driver never rejected a pulse");
    checks++; if (n_bias_track != 2) fail("bias controllers did not track");
    $display("mechanisms: coarse_add=%0d fine_corr=%0d data_corr=%0d switch=%0d loads=%0d wraps=%0d stops=%0d drv_disable=%0d pin_rejected=%0d bias_track=%0d",
             n_coarse_add, n_fine_corr, n_data_corr, n_switch, n_load, n_wrap, n_stop, n_drv_disable, n_pin_reject, n_bias_track);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 2000.0);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
