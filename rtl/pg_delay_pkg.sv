// pg_delay_pkg: transport-delay helper for the behavioural delay models.
//
// wait_fs(n) suspends the calling process for n femtoseconds (n < 2^24, i.e.
// up to 16.7 ns) by taking a fixed, compile-time-known delay for every set bit
// of n. Each call costs at most 24 suspensions. Callers fork one process per
// input edge, which gives transport (not inertial) delay: pulses narrower than
// the delay still pass, as they do through the real delay lines.
package pg_delay_pkg;
  timeunit 1ps; timeprecision 1fs;

  task automatic wait_fs(input logic [23:0] n);
    if (n[23]) #8388.608;
    if (n[22]) #4194.304;
    if (n[21]) #2097.152;
    if (n[20]) #1048.576;
    if (n[19]) #524.288;
    if (n[18]) #262.144;
    if (n[17]) #131.072;
    if (n[16]) #65.536;
    if (n[15]) #32.768;
    if (n[14]) #16.384;
    if (n[13]) #8.192;
    if (n[12]) #4.096;
    if (n[11]) #2.048;
    if (n[10]) #1.024;
    if (n[9])  #0.512;
    if (n[8])  #0.256;
    if (n[7])  #0.128;
    if (n[6])  #0.064;
    if (n[5])  #0.032;
    if (n[4])  #0.016;
    if (n[3])  #0.008;
    if (n[2])  #0.004;
    if (n[1])  #0.002;
    if (n[0])  #0.001;
  endtask

  // Picoseconds (real) to the femtosecond count taken by wait_fs.
  function automatic logic [23:0] ps_to_fs(input real ps);
    real fs;
    fs = ps * 1000.0;
    if (fs < 1.0) return 24'd1;
    if (fs > 16777215.0) return 24'hFFFFFF;
    return 24'(longint'(fs));
  endfunction
endpackage
