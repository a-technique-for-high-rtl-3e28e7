// tb_dummy_delay_chain: checks that the dummy chain delays both edges by
// 12 data delays (12 x 500 ps at 2.5 V, 12 x 460 ps at 1.5 V), then at 20
// random biases against 12 x (XOR 100 ps + 2 x (150 ps + 20 ps/V x V_DP)),
// and finally with a 156.25 MHz clock train, so that several edges are in
// the chain at once, each of which must come out with the same delay.
module tb_dummy_delay_chain;
  timeunit 1ps; timeprecision 1fs;

  logic din = 1'b0, dout;
  real v_dp_data = 2.5;
  int checks = 0, failures = 0;
  realtime edges [$];

  dummy_delay_chain #(.LEN(12)) dut (.*);

  always @(dout) edges.push_back($realtime);

  task automatic try(input real v, input real exp);
    realtime t0;
    v_dp_data = v; edges.delete();
    #100 t0 = $realtime; din = 1'b1; #3200 din = 1'b0; #10000;
    checks++;
    if (edges.size() != 2) begin failures++; $display("FAIL %0d edges", edges.size()); end
    else begin
      checks++;
      if ((edges[0] - t0) < exp - 0.05 || (edges[0] - t0) > exp + 0.05 ||
          (edges[1] - edges[0]) < 3199.95 || (edges[1] - edges[0]) > 3200.05) begin
        failures++; $display("FAIL delay %0.3f exp %0.3f", edges[0] - t0, exp);
      end
    end
  endtask

  initial begin
    #100;
    try(2.5, 6000.0);
    try(1.5, 5520.0);
    for (int i = 0; i < 20; i++) begin
      real v = 5.0 * real'($urandom_range(1000)) / 1000.0;
      try(v, 12.0 * (100.0 + 2.0 * (150.0 + 20.0 * v)));
    end
    // Clock train: 8 periods of 6.4 ns through a 6 ns chain.
    v_dp_data = 2.5; edges.delete();
    #100;
    for (int i = 0; i < 16; i++) begin
      din = ~din;
      #3200;
    end
    #10000;
    checks++;
    if (edges.size() != 16) begin failures++; $display("FAIL train: %0d edges", edges.size()); end
    else for (int i = 1; i < 16; i++) begin
      checks++;
      if (edges[i] - edges[i-1] < 3199.95 || edges[i] - edges[i-1] > 3200.05) begin
        failures++; $display("FAIL train edge %0d spacing %0.3f", i, edges[i] - edges[i-1]);
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
