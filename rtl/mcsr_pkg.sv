// mcsr_pkg: constants and helper functions shared by the multi-clocked scan
// register (MCSR) modules and their testbenches.
//
// Timing: the asP* controllers are self-timed; their delays are properties of
// the transistor circuit, so the behavioural controller model takes them as
// parameters. The defaults below split one asP* event (predecessor full and
// successor empty -> state change complete) into 15 ps data settle, 30 ps
// enable pulse and 16 ps recovery, 61 ps in all. With n+1 controllers in the
// MCSR ring one shift therefore takes 61*(n+1) ps, which reproduces the
// published 0.13 um cycle times (0.305 ns for n=4 ... 3.97 ns for n=64) to
// within 0.5 %. The split itself is this design's own choice.
//
// Area: the estimate counts latch equivalents ("lt"). A conventional L1/L2
// scan cell costs one extra latch per scan bit, so a chain of m*n bits costs
// m*n lt of overhead. The MCSR costs the m extra latches of row 0 plus three
// latch equivalents per asP* controller, m + 3(n+1) lt.
package mcsr_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Nominal asP* event timing in picoseconds.
  localparam int unsigned T_DATA_PS  = 15;  // predecessor full -> enable rises
  localparam int unsigned T_PULSE_PS = 30;  // width of the enable pulse
  localparam int unsigned T_STATE_PS = 16;  // enable falls -> states flip
  localparam int unsigned T_EVENT_PS = T_DATA_PS + T_PULSE_PS + T_STATE_PS;

  // Published configuration: m columns (scan paths through the array),
  // n rows controlled by c_1..c_n.
  localparam int unsigned M_DEFAULT = 32;
  localparam int unsigned N_DEFAULT = 16;

  // Shift cycle of a free-running MCSR ring with n+1 controllers.
  function automatic int unsigned cycle_ps(int unsigned n);
    return T_EVENT_PS * (n + 1);
  endfunction

  // Scan overhead of the conventional L1/L2 scan cell, in latch units.
  function automatic int unsigned area_typical(int unsigned m, int unsigned n);
    return m * n;
  endfunction

  // Scan overhead of the MCSR: row 0 latches plus n+1 controllers of 3 lt.
  function automatic int unsigned area_mcsr(int unsigned m, int unsigned n);
    return m + 3 * (n + 1);
  endfunction

  // MCSR overhead as a share of the conventional overhead, in 0.1 % units.
  function automatic int unsigned area_ratio_permille(int unsigned m, int unsigned n);
    return (1000 * area_mcsr(m, n) + area_typical(m, n) / 2) / area_typical(m, n);
  endfunction

endpackage
