// tb_generator_core: checks the 64-stage matched delay generator with single
// clock pulses.
//
// For each pulse the T bits are random. Stage j (1-based) is clocked
// (j-1)*delta_C after the pulse enters, so its edge must leave the generator
// at (j-1)*delta_C + (65-j)*delta_X, independently of the other stages.
// The test collects every output edge and compares it with that list, for the
// nominal biases (delta_C = 400 ps, delta_X = 500 ps: edges on a 100 ps grid,
// stage 64's first after 25.7 ns, stage 1's last after 32 ns) and for a lower
// clock bias (delta_C = 380 ps, grid 120 ps), which shows that the spacing is
// the difference of the two delays. It also checks the clock tap timing.
module tb_generator_core;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N = 64;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] t_bits = '0;
  real v_dp_clk = 2.5, v_dp_data = 2.5;
  logic data_out, data_out_n;
  logic [N:0] clk_tap;
  logic [N-1:0] data_tap, tff_q;
  int checks = 0, failures = 0;
  realtime out_edges [$];
  realtime tap16_rise, tap64_rise;

  generator_core #(.STAGES(N)) dut (.*);

  always @(data_out) out_edges.push_back($realtime);
  always @(posedge clk_tap[16]) tap16_rise = $realtime;
  always @(posedge clk_tap[64]) tap64_rise = $realtime;

  task automatic one_pulse(input real dc, input real dx, input string tag);
    realtime t0;
    logic [N-1:0] pat;
    int n_exp;
    pat = {$urandom, $urandom};
    t_bits = pat;
    out_edges.delete();
    #1000;
    t0 = $realtime;
    clk = 1'b1; #3200 clk = 1'b0;
    #40000;
    t_bits = '0;
    n_exp = $countones(pat);
    checks++;
    if (out_edges.size() != n_exp) begin
      failures++; $display("FAIL %s: %0d edges, exp %0d", tag, out_edges.size(), n_exp);
    end else begin
      int k = 0;
      // Output order: highest stage first.
      for (int j = N; j >= 1; j--) begin
        if (pat[j-1]) begin
          real exp_t = (j - 1) * dc + (N + 1 - j) * dx;
          checks++;
          if ((out_edges[k] - t0) < exp_t - 0.01 || (out_edges[k] - t0) > exp_t + 0.01) begin
            failures++;
            $display("FAIL %s stage %0d: edge at %0.3f exp %0.3f", tag, j, out_edges[k] - t0, exp_t);
          end
          k++;
        end
      end
    end
    checks++;
    if ((tap16_rise - t0) < 16 * dc - 0.01 || (tap16_rise - t0) > 16 * dc + 0.01 ||
        (tap64_rise - t0) < 64 * dc - 0.01 || (tap64_rise - t0) > 64 * dc + 0.01) begin
      failures++; $display("FAIL %s clock taps %0.3f %0.3f", tag, tap16_rise - t0, tap64_rise - t0);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0; #10 rst_n = 1'b1;
    #40000;
    for (int r = 0; r < 4; r++) one_pulse(400.0, 500.0, "nominal");
    v_dp_clk = 2.0;
    #40000;
    for (int r = 0; r < 2; r++) one_pulse(380.0, 500.0, "clock bias 2.0V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
