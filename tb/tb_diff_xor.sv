// tb_diff_xor: checks the XOR model's function for every input change and
// its 100 ps delay, and that two input changes 30 ps apart give two output
// edges (transport delay).
module tb_diff_xor;
  timeunit 1ps; timeprecision 1fs;

  logic a = 1'b0, b = 1'b0, x, x_n;
  int checks = 0, failures = 0;
  realtime edges [$];

  diff_xor dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .x(x), .x_n(x_n));

  always @(x) edges.push_back($realtime);

  initial begin
    #500;
    for (int i = 0; i < 64; i++) begin
      realtime t0;
      edges.delete();
      t0 = $realtime;
      if ($urandom_range(1)) a = ~a; else b = ~b;
      #99.9;
      checks++;
      if (edges.size() != 0) begin failures++; $display("FAIL early edge"); end
      #0.2;
      checks++;
      if (x !== (a ^ b) || x_n !== ~(a ^ b) || edges.size() != 1) begin
        failures++; $display("FAIL x=%b a=%b b=%b", x, a, b);
      end
      #300;
    end
    edges.delete();
    a = ~a; #30 b = ~b; #500;
    checks++;
    if (edges.size() != 2) begin failures++; $display("FAIL close changes gave %0d edges", edges.size()); end
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
