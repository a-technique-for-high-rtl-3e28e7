// pg_pkg: sizes and nominal timing of the matched delay pattern generator.
//
// The generator has 64 stages grouped into 4 sections of 16; every stage owns
// an 8-bit circular FIFO of pattern bits. The nominal clock delay per stage is
// 400 ps, the nominal data delay per stage 500 ps, so edges land on a 100 ps
// grid, and the clock period is 64 x 100 ps = 6.4 ns (156.25 MHz). These
// numbers are the published ones. The split of a stage delay into two delay
// elements plus (for data) one XOR, and the linear delay-versus-bias law, are
// this model's choices: each delay element gives 150 ps + 20 ps/V * V_DP, so
// two elements span 300..500 ps and XOR + two elements span 400..600 ps over a
// 0..5 V bias, centred on the nominal values at 2.5 V.
package pg_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N_STAGES     = 64;  // generator stages
  localparam int unsigned N_SECTIONS   = 4;   // clock pulses in flight
  localparam int unsigned SECTION_LEN  = N_STAGES / N_SECTIONS;  // 16
  localparam int unsigned FIFO_DEPTH   = 8;   // pattern bits per stage

  // Nominal timing, picoseconds.
  localparam real T_CLK_PS        = 6400.0;  // generator clock period
  localparam real DELTA_C_PS      = 400.0;   // clock delay per stage
  localparam real DELTA_X_PS      = 500.0;   // data delay per stage
  localparam real RESOLUTION_PS   = DELTA_X_PS - DELTA_C_PS;  // 100 ps

  // Delay law of one differential delay element (model choice, see above).
  localparam real ELEM_BASE_PS    = 150.0;
  localparam real ELEM_SLOPE_PS_V = 20.0;
  localparam real XOR_DELAY_PS    = 100.0;   // fixed by V_XP = V_XN = 2.5 V

  // Supply and bias range.
  localparam real VDD             = 5.0;
  localparam real V_NOMINAL       = 2.5;

  function automatic real elem_delay_ps(input real v_dp);
    real v;
    v = (v_dp < 0.0) ? 0.0 : ((v_dp > VDD) ? VDD : v_dp);
    return ELEM_BASE_PS + ELEM_SLOPE_PS_V * v;
  endfunction
endpackage
