// tb_pattern_memory: self-checking test of the 64 x 8 circular pattern memory.
//
// Loads 8 random rows with the memory idle, plays them for 3 full turns and
// checks every presented word against the loaded rows in load order (the
// first word must appear on the first falling edge after run rises). Then it
// checks that pausing forces zeros and keeps the read position, that a load
// attempt while running changes nothing, and that a reload replaces the
// pattern.
module tb_pattern_memory;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned STAGES = 64;
  localparam int unsigned DEPTH  = 8;
  localparam real HALF = 3200.0;

  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0, load_en = 1'b0;
  logic [STAGES-1:0] load_row = '0, t_bits;
  int checks = 0, failures = 0;
  logic [STAGES-1:0] rows [DEPTH];
  int rd = 0;

  pattern_memory #(.STAGES(STAGES), .DEPTH(DEPTH)) dut (.*);

  always #(HALF) clk = ~clk;

  task automatic check(input logic [STAGES-1:0] exp, input string what);
    checks++;
    if (t_bits !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h at %0t", what, t_bits, exp, $time);
    end
  endtask

  task automatic load_all();
    for (int w = 0; w < DEPTH; w++) begin
      rows[w] = {$urandom, $urandom};
      @(posedge clk); load_en <= 1'b1; load_row <= rows[w];
      @(negedge clk);
    end
    @(posedge clk); load_en <= 1'b0;
  endtask

  // Play n words, checking each right after the falling edge that shows it.
  task automatic play(input int n);
    @(posedge clk); run <= 1'b1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk); #1;
      check(rows[rd], "play");
      rd = (rd + 1) % DEPTH;
    end
    @(posedge clk); run <= 1'b0;
    @(negedge clk); #1;
    check('0, "idle output zero");
  endtask

  initial begin
    #2 rst_n = 1'b0;
    #(5 * HALF) rst_n = 1'b1;
    @(negedge clk); #1; check('0, "after reset");
    load_all();
    check('0, "idle while loading");
    play(3 * DEPTH);
    play(5);                    // resumes at word 0 after 24 words
    // A load attempt while running must be ignored.
    @(posedge clk); run <= 1'b1; load_en <= 1'b1; load_row <= ~rows[rd];
    @(negedge clk); #1; check(rows[rd], "load ignored while running");
    rd = (rd + 1) % DEPTH;
    @(posedge clk); load_en <= 1'b0; run <= 1'b0;
    @(negedge clk);
    play(DEPTH + 3);
    // Reload and play from the new first row.
    load_all(); rd = 0;
    play(DEPTH);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2.0 * HALF * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
