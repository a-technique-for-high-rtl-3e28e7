// tb_phase_detector: checks the four rows of the detector's truth table and
// its 100 ps dead zone. phi1 first by 300 ps -> 1 0; phi2 first -> 0 1;
// simultaneous or 100 ps apart or less -> 0 0; the invalid 1 1 state arises
// when phi1 falls and rises again while phi2 is still high.
module tb_phase_detector;
  timeunit 1ps; timeprecision 1fs;

  logic phi1 = 1'b0, phi2 = 1'b0, phi1_first, phi2_first;
  int checks = 0, failures = 0;

  phase_detector #(.DEAD_ZONE_PS(100.0)) dut (.*);

  task automatic chk(input logic e1, input logic e2, input string what);
    checks++;
    if (phi1_first !== e1 || phi2_first !== e2) begin
      failures++;
      $display("FAIL %s: got %b%b exp %b%b", what, phi1_first, phi2_first, e1, e2);
    end
  endtask

  // phi1 rises at offset 0, phi2 at offset d (negative: phi2 first); both high 3 ns.
  task automatic pair(input real d);
    if (d >= 0.0) begin
      phi1 = 1'b1; #(d) phi2 = 1'b1;
      #3000 phi1 = 1'b0; #(d) phi2 = 1'b0;
    end else begin
      phi2 = 1'b1; #(-d) phi1 = 1'b1;
      #3000 phi2 = 1'b0; #(-d) phi1 = 1'b0;
    end
    #3000;
  endtask

  initial begin
    #1000;
    pair(300.0);  chk(1'b1, 1'b0, "phi1 first");
    pair(-300.0); chk(1'b0, 1'b1, "phi2 first");
    pair(0.0);    chk(1'b0, 1'b0, "together");
    pair(80.0);   chk(1'b0, 1'b0, "80 ps apart reads in phase");
    pair(-80.0);  chk(1'b0, 1'b0, "-80 ps apart reads in phase");
    pair(150.0);  chk(1'b1, 1'b0, "150 ps apart resolved");
    pair(-150.0); chk(1'b0, 1'b1, "-150 ps apart resolved");
    // Invalid: phi1 rises, phi2 rises, phi1 pulses again while phi2 is high.
    phi1 = 1'b1; #500 phi2 = 1'b1; #500 phi1 = 1'b0; #500 phi1 = 1'b1; #10;
    chk(1'b1, 1'b1, "invalid 1-1");
    phi1 = 1'b0; phi2 = 1'b0; #3000;
    for (int i = 0; i < 40; i++) begin
      real d = real'($urandom_range(2000)) - 1000.0;
      if (d > -110.0 && d < 110.0) d = 400.0;
      pair(d);
      chk(d > 0.0, d < 0.0, "random order");
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
