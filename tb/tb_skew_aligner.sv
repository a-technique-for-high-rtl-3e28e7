// tb_skew_aligner: self-checking test of the per-section skew flip-flops.
//
// Random words enter on falling edges, as the memory presents them. A
// reference keeps the history of inputs; section k's first-half bits must
// equal the input from k falling edges ago, checked just before each rising
// edge and just before each falling edge, and its second-half bits must equal
// what the first half showed at the last rising edge, i.e. the input from k
// falling edges before that rising edge. The test also checks the reset.
module tb_skew_aligner;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned STAGES = 64, SECTIONS = 4, LEN = 16, HALF_LEN = 8;
  localparam real HALF = 3200.0;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [STAGES-1:0] t_mem = '0, t_gen;
  int checks = 0, failures = 0;
  logic [STAGES-1:0] hist [$];   // hist[0] = newest input

  skew_aligner #(.STAGES(STAGES), .SECTIONS(SECTIONS)) dut (.*);

  always #(HALF) clk = ~clk;

  function automatic logic [STAGES-1:0] past(input int n);
    return (n < hist.size()) ? hist[n] : '0;
  endfunction

  // Expected output; neg_since_rise = falling edges since the last rising edge (0 or 1).
  function automatic logic [STAGES-1:0] expected(input int neg_since_rise);
    logic [STAGES-1:0] e;
    for (int k = 0; k < SECTIONS; k++) begin
      logic [STAGES-1:0] first_h, second_h;
      first_h  = past(k);
      second_h = past(k + neg_since_rise);
      e[k*LEN +: HALF_LEN]            = first_h[k*LEN +: HALF_LEN];
      e[k*LEN+HALF_LEN +: HALF_LEN]   = second_h[k*LEN+HALF_LEN +: HALF_LEN];
    end
    return e;
  endfunction

  initial begin
    #2 rst_n = 1'b0;
    #10;
    checks++; if (t_gen !== '0) begin failures++; $display("FAIL reset"); end
    #(4 * HALF) rst_n = 1'b1;
    for (int i = 0; i < 10; i++) hist.push_front('0);
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      begin
        automatic logic [STAGES-1:0] w = {$urandom, $urandom};
        t_mem <= w;             // as the memory drives it, after the edge
        hist.push_front(w);
      end
      #(HALF - 10.0);           // just before the rising edge
      checks++;
      if (t_gen !== expected(1)) begin
        failures++; $display("FAIL before rise c=%0d got %h exp %h", c, t_gen, expected(1));
      end
      @(posedge clk);
      #(HALF - 10.0);           // just before the falling edge
      checks++;
      if (t_gen !== expected(0)) begin
        failures++; $display("FAIL before fall c=%0d got %h exp %h", c, t_gen, expected(0));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2.0 * HALF * 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
