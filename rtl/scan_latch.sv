// scan_latch: single-latch scan cell.
//
// One transparent latch serves both as the circuit's normal register and as
// one bit of the scan path, so no second (slave) latch is needed. A mode
// select `sw` chooses, with a pair of multiplexers, both what the latch loads
// and what opens it:
//   sw = 0 (normal mode): the latch is opened by the system clock `clk` and
//                         loads the functional input `d`;
//   sw = 1 (test mode):   the latch is opened by the row enable pulse `en`
//                         from the asP* controller and loads `si`, the
//                         output of the previous cell in the scan path.
// `q` is both the functional output and the scan output of the cell.
//
// Timing: the latch is transparent while its selected gate is high, so the
// selected data must be stable for the whole of the gate pulse. In test mode
// the asP* protocol guarantees that (the previous cell is held "full" until
// this cell's pulse has ended).
//
// The cell's structure (one latch, input and gate multiplexers controlled by
// sw) follows the published single-latch scan cell; the polarity of sw
// (1 = test) and the active-high gate are this design's choices.
module scan_latch (
  input  logic sw,     // 1: test (scan) mode, 0: normal mode
  input  logic clk,    // normal-mode gate, active high
  input  logic en,     // test-mode gate pulse from the row controller
  input  logic d,      // functional data from the circuit under test
  input  logic si,  // scan data from the previous cell
  output logic q       // latch output: functional and scan output
);
  timeunit 1ps;
  timeprecision 1ps;

  logic gate;
  logic din;

  always_comb begin
    gate = sw ? en    : clk;
    din  = sw ? si : d;
  end

  // The cell is intentionally a level-sensitive latch.
  always_latch begin
    if (gate) q <= din;
  end

endmodule
