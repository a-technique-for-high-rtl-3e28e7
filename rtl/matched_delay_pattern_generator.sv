// matched_delay_pattern_generator: the complete pattern generator chip, as a
// mixed model (synthesizable control logic plus behavioural delay lines).
//
// A 156.25 MHz clock drives a 64-stage matched delay generator. Every clock
// period, one 64-bit word of edge flags from the pattern memory is turned
// into a 6.4 ns stretch of serial output with 100 ps slots: a 1 for stage j
// puts a transition in slot 64-j of that period (stage 64 first, stage 1
// last). The slot width is the difference of two matched delays,
// delta_X - delta_C = 500 ps - 400 ps, not an absolute gate delay.
//
// Blocks and wiring:
//   pattern_memory  -> skew_aligner -> generator_core -> two output_drivers
//   clock DLLs: coarse compares clock taps 0 and 16 (16 delta_C = T), fine
//     compares taps 0 and 64 (64 delta_C = 4T); both charge one loop filter
//     whose voltage is the clock chain bias. dll_fine_sel = 0 runs the coarse
//     loop, 1 the fine loop; lock coarse first, then switch.
//   data DLL: compares clock tap 20 with the clock passed through the dummy
//     chain (12 data delays) and the compensation delay (about 4 data delays),
//     since 20 delta_C = 16 delta_X; it sets the data chain bias. It always
//     runs.
// Outputs: gen_out is the on-chip serial stream; pin_out* go through the
// package pin drivers (up to about 80 Mb/s), probe_out* through the probe pad
// drivers (up to 833 Mb/s). The loop filter voltages are brought out as
// v_dp_clk / v_dp_data, since the filters are off-chip. Each chain also has
// an automatic bias controller that derives the NMOS bias from that voltage;
// its outputs v_dn_clk / v_dn_data are brought out for observation (the delay
// model is written in terms of V_DP alone).
//
// Usage: hold run = 0, pulse load_en with 8 rows (the first row loaded plays
// first), let the DLLs lock, then set run = 1. The 8 words repeat every 8
// clocks. Output edges of the word presented on falling edge n come from the
// pulse launched on the next rising edge and leave the generator between
// 25.7 ns and 32 ns after it, plus the driver delay. The block structure, tap
// choices and sizes follow the published chip; the mode select input, reset,
// and the initial filter voltages are this design's choices.
//
// Lock accuracy: each loop stops correcting once its two edges are within
// PD_DEAD_ZONE_PS (100 ps, the published detector's in-phase window). The
// data loop spreads that error over its 12 dummy elements, so delta_X may
// settle up to about 8 ps from 500 ps; 64 slots then no longer fill one
// clock period exactly and every word boundary of the output carries the
// difference T - 64 (delta_X - delta_C), several hundred ps at worst.
module matched_delay_pattern_generator
  import pg_pkg::*;
#(
  parameter int unsigned STAGES        = N_STAGES,
  parameter int unsigned DEPTH         = FIFO_DEPTH,
  parameter real         V_INIT_CLK    = 1.5,
  parameter real         V_INIT_DATA   = 1.5,
  parameter real         PIN_PULSE_PS  = 12500.0,  // 80 Mb/s
  parameter real         PROBE_PULSE_PS = 1200.0,  // 833 Mb/s
  parameter real         PD_DEAD_ZONE_PS = 100.0   // phase detector's in-phase window
) (
  input  logic              clk,
  input  logic              rst_n,
  // pattern memory
  input  logic              run,
  input  logic              load_en,
  input  logic [STAGES-1:0] load_row,
  // DLL control and off-chip biases
  input  logic              dll_fine_sel,
  input  real               v_add_bias,
  input  real               v_rmv_bias,
  input  real               comp_delay_ps,
  // drivers
  input  logic              pin_en,
  input  logic              probe_en,
  output logic              gen_out,
  output logic              pin_out,
  output logic              pin_out_n,
  output logic              probe_out,
  output logic              probe_out_n,
  // off-chip loop filter voltages
  output real               v_dp_clk,
  output real               v_dp_data,
  output real               v_dn_clk,
  output real               v_dn_data
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned SECTIONS = STAGES / SECTION_LEN;

  logic [STAGES-1:0] t_mem, t_gen;
  logic [STAGES:0]   clk_tap;
  logic [STAGES-1:0] data_tap, tff_q;
  logic              gen_out_n;
  logic              dummy_out, comp_out;

  pattern_memory #(.STAGES(STAGES), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .rst_n(rst_n), .run(run), .load_en(load_en),
    .load_row(load_row), .t_bits(t_mem));

  skew_aligner #(.STAGES(STAGES), .SECTIONS(SECTIONS)) u_skew (
    .clk(clk), .rst_n(rst_n), .t_mem(t_mem), .t_gen(t_gen));

  generator_core #(.STAGES(STAGES)) u_core (
    .clk(clk), .rst_n(rst_n), .t_bits(t_gen),
    .v_dp_clk(v_dp_clk), .v_dp_data(v_dp_data),
    .data_out(gen_out), .data_out_n(gen_out_n),
    .clk_tap(clk_tap), .data_tap(data_tap), .tff_q(tff_q));

  // Clock chain DLLs: coarse (taps 16 apart) and fine (taps 64 apart).
  logic c_p1f, c_p2f, c_add, c_rmv, f_p1f, f_p2f, f_add, f_rmv;
  real  c_rate, f_rate;

  dll #(.DEAD_ZONE_PS(PD_DEAD_ZONE_PS)) u_dll_coarse (
    .enable(~dll_fine_sel), .phi1(clk_tap[0]), .phi2(clk_tap[SECTION_LEN]),
    .v_add_bias(v_add_bias), .v_rmv_bias(v_rmv_bias),
    .phi1_first(c_p1f), .phi2_first(c_p2f), .add(c_add), .rmv(c_rmv),
    .rate_v_per_us(c_rate));

  dll #(.DEAD_ZONE_PS(PD_DEAD_ZONE_PS)) u_dll_fine (
    .enable(dll_fine_sel), .phi1(clk_tap[0]), .phi2(clk_tap[STAGES]),
    .v_add_bias(v_add_bias), .v_rmv_bias(v_rmv_bias),
    .phi1_first(f_p1f), .phi2_first(f_p2f), .add(f_add), .rmv(f_rmv),
    .rate_v_per_us(f_rate));

  loop_filter #(.V_INIT(V_INIT_CLK)) u_filt_clk (
    .rate_a_v_per_us(c_rate), .rate_b_v_per_us(f_rate), .v_out(v_dp_clk));

  // Data chain DLL: clock tap 20 against dummy chain + compensation delay.
  logic x_p1f, x_p2f, x_add, x_rmv;
  real  x_rate;

  dummy_delay_chain #(.LEN(12)) u_dummy (
    .din(clk), .v_dp_data(v_dp_data), .dout(dummy_out));

  compensation_delay u_comp (
    .din(dummy_out), .delay_ps(comp_delay_ps), .dout(comp_out));

  dll #(.DEAD_ZONE_PS(PD_DEAD_ZONE_PS)) u_dll_data (
    .enable(1'b1), .phi1(clk_tap[20]), .phi2(comp_out),
    .v_add_bias(v_add_bias), .v_rmv_bias(v_rmv_bias),
    .phi1_first(x_p1f), .phi2_first(x_p2f), .add(x_add), .rmv(x_rmv),
    .rate_v_per_us(x_rate));

  loop_filter #(.V_INIT(V_INIT_DATA)) u_filt_data (
    .rate_a_v_per_us(x_rate), .rate_b_v_per_us(0.0), .v_out(v_dp_data));

  // Automatic bias controllers: V_DN of each chain follows its V_DP.
  real  vdiv_clk, vdiv_data;
  logic bc_hi_clk, bc_hi_data;

  bias_controller u_bias_clk (
    .v_dp(v_dp_clk), .v_dn(v_dn_clk), .v_div(vdiv_clk), .cmp_high(bc_hi_clk));

  bias_controller u_bias_data (
    .v_dp(v_dp_data), .v_dn(v_dn_data), .v_div(vdiv_data), .cmp_high(bc_hi_data));

  // Output drivers.
  output_driver #(.MIN_PULSE_PS(PIN_PULSE_PS)) u_pin_drv (
    .din(gen_out), .enable(pin_en), .dout(pin_out), .dout_n(pin_out_n));

  output_driver #(.MIN_PULSE_PS(PROBE_PULSE_PS)) u_probe_drv (
    .din(gen_out), .enable(probe_en), .dout(probe_out), .dout_n(probe_out_n));

endmodule
