// tb_scan_latch: self-checking test of the single-latch scan cell.
// Drives every combination of mode, gate and data, and checks that the cell
// follows the selected data while the selected gate is high, holds otherwise,
// and ignores the gate and data of the other mode.
module tb_scan_latch;
  timeunit 1ps;
  timeprecision 1ps;

  logic sw, clk, en, d, si, q;
  int unsigned checks = 0, failures = 0;
  logic model;

  scan_latch dut (.sw(sw), .clk(clk), .en(en), .d(d), .si(si), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%b expected %b", what, q, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Load a known value in normal mode.
    sw = 0; clk = 0; en = 0; d = 0; si = 1;
    #10 clk = 1; #10 clk = 0; #5;
    model = 0;
    check(model, "normal load 0");
    for (int it = 0; it < 400; it++) begin
      logic nsw, nd, nsi, gate_clk, gate_en;
      nsw = $urandom_range(0, 1);
      nd  = $urandom_range(0, 1);
      nsi = $urandom_range(0, 1);
      gate_clk = $urandom_range(0, 1);
      gate_en  = $urandom_range(0, 1);
      sw = nsw; d = nd; si = nsi; #5;
      check(model, "hold while gates low");
      // Pulse the chosen gates together.
      clk = gate_clk; en = gate_en; #5;
      if (sw ? gate_en : gate_clk) model = sw ? si : d;
      check(model, "during gate");
      // Transparency: change the selected data while the gate is open.
      if (sw ? gate_en : gate_clk) begin
        if (sw) si = ~si; else d = ~d;
        #2;
        model = sw ? si : d;
        check(model, "transparent");
      end
      clk = 0; en = 0; #5;
      // After the gate closes, data changes are not seen.
      d = ~d; si = ~si; #5;
      check(model, "closed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
