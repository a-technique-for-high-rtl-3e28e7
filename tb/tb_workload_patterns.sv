// tb_workload_patterns: runs the output patterns the generator is
// characterised with, on two full-size generators (64 stages, 8-word FIFOs)
// driven by the same clock, controls and memory contents.
//   dut       - every parameter at its default, including the phase
//               detector's 100 ps in-phase window;
//   dut_sharp - the same design with a 5 ps detector window; once locked,
//               its charge pump biases are moved towards the off level
//               (add 3.8 V, remove 1.2 V) so that one correction is smaller
//               than the window, as the bias inputs are meant to be used.
//
// Patterns:
// 1. Maximum rate: one edge every 12 slots (1.2 ns pulses at 100 ps slots,
//    833 Mb/s). The 512-slot memory turn is not a multiple of 12, so a turn
//    holds 42 edges 12 slots apart and a 20-slot gap at the seam (an 8-slot
//    seam would be narrower than the probe driver passes).
// 2. Pin rate: one edge every 125 slots (12.5 ns, 80 Mb/s, the rating of the
//    package pin drivers).
//
// Checks on dut: the number of edges at the data-chain taps after stages 1,
// 16, 32 and 64 grows downstream exactly as the T bits of stages 1..j say;
// every on-chip output edge lies at launch + w*T + (j-1)*delta_C +
// (65-j)*delta_X (word w, stage j; delays measured from the locked taps);
// the probe driver repeats every max-rate edge and the pin driver none; the
// pin driver repeats every pin-rate edge with the on-chip spacing.
// Checks on dut_sharp: every max-rate output interval, word boundaries
// included, is 12 slots (20 at the seam) of 100 ps within 40 ps, i.e. the
// stream is continuous at 833 Mb/s.
// Reported for both: the extra time at each word boundary, T - 64 slots.
// With the 100 ps window the data loop may settle delta_X several ps off,
// and that error, multiplied by 64, appears at every word boundary.
module tb_workload_patterns;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 64, DEPTH = 8, SLOTS = N * DEPTH;
  localparam real T = 6400.0, HALF = 3200.0;
  localparam int JS [4] = '{1, 16, 32, 64};   // stages whose data taps are counted

  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0, load_en = 1'b0, dll_fine_sel = 1'b0;
  logic [N-1:0] load_row = '0;
  real v_add_bias = 2.5, v_rmv_bias = 2.5, comp_delay_ps = 2000.0;
  logic pin_en = 1'b1, probe_en = 1'b1;
  logic gen_out, pin_out, pin_out_n, probe_out, probe_out_n;
  real v_dp_clk, v_dp_data, v_dn_clk, v_dn_data;
  logic s_gen, s_pin, s_pin_n, s_probe, s_probe_n;
  real s_v_clk, s_v_data, s_add_bias = 2.5, s_rmv_bias = 2.5;

  matched_delay_pattern_generator dut (.*);

  matched_delay_pattern_generator #(.PD_DEAD_ZONE_PS(5.0)) dut_sharp (
    .clk, .rst_n, .run, .load_en, .load_row, .dll_fine_sel, .v_add_bias(s_add_bias), .v_rmv_bias(s_rmv_bias),
    .comp_delay_ps, .pin_en, .probe_en, .gen_out(s_gen), .pin_out(s_pin), .pin_out_n(s_pin_n),
    .probe_out(s_probe), .probe_out_n(s_probe_n), .v_dp_clk(s_v_clk), .v_dp_data(s_v_data),
    .v_dn_clk(), .v_dn_data());

  always #(HALF) clk = ~clk;

  int checks = 0, failures = 0;
  logic [N-1:0] rows [DEPTH];
  int tap_cnt [4];
  realtime gen_e [$], probe_e [$], pin_e [$], sharp_e [$];
  realtime t_clk_rise, t_tap64, t_comp, s_tap64, s_comp, t_launch;
  real dc, dx, s_dc, s_dx;

  always @(gen_out)   gen_e.push_back($realtime);
  always @(probe_out) probe_e.push_back($realtime);
  always @(pin_out)   pin_e.push_back($realtime);
  always @(s_gen)     sharp_e.push_back($realtime);
  always @(dut.data_tap[0])  tap_cnt[0]++;
  always @(dut.data_tap[15]) tap_cnt[1]++;
  always @(dut.data_tap[31]) tap_cnt[2]++;
  always @(dut.data_tap[63]) tap_cnt[3]++;
  always @(posedge clk) t_clk_rise = $realtime;
  always @(posedge dut.clk_tap[64])       t_tap64 = $realtime;
  always @(posedge dut.comp_out)          t_comp  = $realtime;
  always @(posedge dut_sharp.clk_tap[64]) s_tap64 = $realtime;
  always @(posedge dut_sharp.comp_out)    s_comp  = $realtime;

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

  // `count` edges `gap` slots apart from slot 0 (slot s = word s/64, stage 64 - s%64).
  task automatic load_periodic(input int gap, input int count);
    for (int w = 0; w < DEPTH; w++) rows[w] = '0;
    for (int i = 0; i < count; i++) rows[(i * gap) / N][N - 1 - ((i * gap) % N)] = 1'b1;
    for (int w = 0; w < DEPTH; w++) begin
      @(posedge clk); load_en <= 1'b1; load_row <= rows[w];
    end
    @(posedge clk); load_en <= 1'b0;
  endtask

  function automatic int ones_below(input logic [N-1:0] r, input int j);
    int c = 0;
    for (int i = 0; i < j; i++) c += int'(r[i]);
    return c;
  endfunction

  // Play two memory turns from word 0 and collect the edges, drain included.
  task automatic play_two_turns();
    gen_e.delete(); probe_e.delete(); pin_e.delete(); sharp_e.delete();
    foreach (tap_cnt[i]) tap_cnt[i] = 0;
    @(posedge clk); run <= 1'b1;
    @(negedge clk);                  // word 0 presented
    @(posedge clk); t_launch = $realtime;
    repeat (2 * DEPTH - 1) @(posedge clk);
    run <= 1'b0;
    repeat (8) @(posedge clk);
  endtask

  // dut's edges against the stage timing formula.
  task automatic check_formula(input string what, ref realtime e [$], input int gap,
                               input int count, input real extra);
    real want [$];
    for (int tr = 0; tr < 2; tr++)
      for (int i = 0; i < count; i++) begin
        int s = i * gap;
        int w = tr * DEPTH + s / N;
        int j = N - s % N;
        want.push_back(t_launch + w * T + (j - 1) * dc + (N + 1 - j) * dx + extra);
      end
    checks++;
    if (e.size() != want.size()) fail($sformatf("%s edges %0d, expected %0d", what, e.size(), want.size()));
    else foreach (want[i]) begin
      checks++;
      if (e[i] < want[i] - 2.0 || e[i] > want[i] + 2.0)
        fail($sformatf("%s edge %0d at %0.1f, expected %0.1f", what, i, e[i], want[i]));
    end
  endtask

  initial begin
    int exp_cnt [4];
    real iv, want, worst;
    #2 rst_n = 1'b0;
    #(3 * T) rst_n = 1'b1;
    // Lock: coarse loop, then the fine loop; the data loop runs throughout.
    repeat (160) @(posedge clk);
    dll_fine_sel = 1'b1;
    repeat (160) @(posedge clk);
    s_add_bias = 3.8; s_rmv_bias = 1.2;
    repeat (120) @(posedge clk);
    @(posedge clk); #(HALF);
    dc   = (4.0 * T + wrap_off(t_tap64 - t_clk_rise)) / 64.0;
    dx   = (T + wrap_off(t_comp - comp_delay_ps - t_clk_rise)) / 12.0;
    s_dc = (4.0 * T + wrap_off(s_tap64 - t_clk_rise)) / 64.0;
    s_dx = (T + wrap_off(s_comp - comp_delay_ps - t_clk_rise)) / 12.0;
    $display("100 ps window: slot %0.2f ps, word boundary adds %0.1f ps", dx - dc, T - 64.0 * (dx - dc));
    $display("  5 ps window: slot %0.2f ps, word boundary adds %0.1f ps", s_dx - s_dc, T - 64.0 * (s_dx - s_dc));
    checks++;
    if (dx - dc < 90.0 || dx - dc > 110.0) fail($sformatf("slot width %0.2f ps", dx - dc));
    checks++;
    if (s_dx - s_dc < 99.0 || s_dx - s_dc > 101.0) fail($sformatf("sharp slot width %0.2f ps", s_dx - s_dc));

    // 1. Maximum rate.
    load_periodic(12, 42);
    play_two_turns();
    foreach (JS[k]) begin
      exp_cnt[k] = 0;
      for (int w = 0; w < 2 * DEPTH; w++) exp_cnt[k] += ones_below(rows[w % DEPTH], JS[k]);
      checks++;
      if (tap_cnt[k] != exp_cnt[k])
        fail($sformatf("data tap after stage %0d: %0d edges, expected %0d", JS[k], tap_cnt[k], exp_cnt[k]));
    end
    checks++;
    if (!(tap_cnt[0] < tap_cnt[1] && tap_cnt[1] < tap_cnt[2] && tap_cnt[2] < tap_cnt[3]))
      fail("edges do not accumulate downstream");
    $display("max rate: edges at the taps after stages 1/16/32/64 = %0d/%0d/%0d/%0d",
             tap_cnt[0], tap_cnt[1], tap_cnt[2], tap_cnt[3]);
    check_formula("on-chip", gen_e, 12, 42, 0.0);
    check_formula("probe", probe_e, 12, 42, 900.0);
    checks++;
    if (pin_e.size() != 0) fail($sformatf("pin driver passed %0d edges of a 833 Mb/s pattern", pin_e.size()));
    checks++;
    worst = 0.0;
    if (sharp_e.size() != 2 * 42) fail($sformatf("sharp edges %0d, expected 84", sharp_e.size()));
    else for (int i = 1; i < sharp_e.size(); i++) begin
      iv   = sharp_e[i] - sharp_e[i-1];
      want = (i % 42 == 0) ? 100.0 * (SLOTS - 41 * 12) : 1200.0;
      if (iv - want > worst) worst = iv - want;
      if (want - iv > worst) worst = want - iv;
      checks++;
      if (iv < want - 40.0 || iv > want + 40.0)
        fail($sformatf("sharp interval %0d: %0.1f ps, expected %0.1f", i, iv, want));
    end
    $display("max rate, 5 ps window: worst interval error %0.1f ps", worst);

    // 2. Pin rate.
    load_periodic(125, 4);
    play_two_turns();
    check_formula("on-chip", gen_e, 125, 4, 0.0);
    checks++;
    if (pin_e.size() != gen_e.size()) fail($sformatf("pin edges %0d vs %0d", pin_e.size(), gen_e.size()));
    else for (int i = 1; i < pin_e.size(); i++) begin
      checks++;
      iv = (pin_e[i] - pin_e[i-1]) - (gen_e[i] - gen_e[i-1]);
      if (iv < -0.1 || iv > 0.1) fail($sformatf("pin interval %0d differs by %0.2f ps", i, iv));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 1500.0);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
