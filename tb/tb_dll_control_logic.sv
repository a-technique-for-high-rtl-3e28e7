// tb_dll_control_logic: exhaustive test of the DLL control logic truth table,
// including the filtering of the invalid 1-1 detector state and the enable.
module tb_dll_control_logic;
  timeunit 1ps; timeprecision 1fs;

  logic enable, phi1_first, phi2_first, add, rmv;
  int checks = 0, failures = 0;

  dll_control_logic dut (.*);

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        logic e_add, e_rmv;
        {enable, phi1_first, phi2_first} = 3'(v);
        #10;
        e_add = enable && (phi2_first == 1'b1) && (phi1_first == 1'b0);
        e_rmv = enable && (phi1_first == 1'b1) && (phi2_first == 1'b0);
        checks++;
        if (add !== e_add || rmv !== e_rmv) begin
          failures++;
          $display("FAIL en=%b p1=%b p2=%b add=%b rmv=%b", enable, phi1_first, phi2_first, add, rmv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
