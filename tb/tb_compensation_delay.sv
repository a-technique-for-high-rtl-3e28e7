// tb_compensation_delay: checks the variable delay at several settings,
// including the nominal 2 ns (four data delays), then at 20 random settings
// from 0.5 ns to 3 ns with a second edge sent while the first is in flight
// (the delay must carry both, each delayed by the full setting).
module tb_compensation_delay;
  timeunit 1ps; timeprecision 1fs;

  logic din = 1'b0, dout;
  real delay_ps = 2000.0;
  int checks = 0, failures = 0;
  realtime edges [$];

  compensation_delay dut (.*);

  always @(dout) edges.push_back($realtime);

  initial begin
    real ds [4] = '{2000.0, 1750.5, 2300.0, 10.0};
    for (int i = 0; i < 4; i++) begin
      realtime t0;
      delay_ps = ds[i];
      #100 edges.delete(); t0 = $realtime; din = ~din; #5000;
      checks++;
      if (edges.size() != 1 || (edges[0] - t0) < ds[i] - 0.01 || (edges[0] - t0) > ds[i] + 0.01 ||
          dout !== din) begin
        failures++; $display("FAIL delay setting %0.1f: %0d edges, first %0.3f, dout %b din %b", ds[i], edges.size(), edges.size() ? edges[0] - t0 : -1.0, dout, din);
      end
    end
    // Random settings, with a second edge sent while the first is in flight.
    for (int i = 0; i < 20; i++) begin
      realtime t0, t1;
      real d = 500.0 + real'($urandom_range(2500));
      delay_ps = d;
      #100 edges.delete(); t0 = $realtime; din = ~din;
      #(d / 2.0) t1 = $realtime; din = ~din;
      #5000;
      checks++;
      if (edges.size() != 2 || edges[0] - t0 < d - 0.01 || edges[0] - t0 > d + 0.01 ||
          edges[1] - t1 < d - 0.01 || edges[1] - t1 > d + 0.01 || dout !== din) begin
        failures++; $display("FAIL random delay %0.1f: %0d edges", d, edges.size());
      end
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
