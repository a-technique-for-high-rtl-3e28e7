// tb_t_flip_flop: self-checking test of the stage toggle flip-flop: reset,
// hold for t = 0, toggle for t = 1 on rising edges only, complement output.
module tb_t_flip_flop;
  timeunit 1ps; timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b1, t = 1'b0, q, q_n;
  int checks = 0, failures = 0;
  logic ref_q = 1'b0;

  t_flip_flop dut (.*);

  task automatic chk();
    checks++;
    if (q !== ref_q || q_n !== ~ref_q) begin
      failures++; $display("FAIL q=%b q_n=%b exp %b at %0t", q, q_n, ref_q, $time);
    end
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #5 chk();
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      t = 1'($urandom);
      #100 clk = 1'b1;
      if (t) ref_q = ~ref_q;
      #1 chk();
      t = ~t;                 // change t mid-high: no effect
      #100 clk = 1'b0;
      #1 chk();
    end
    rst_n = 1'b0; ref_q = 1'b0;
    #1 chk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
