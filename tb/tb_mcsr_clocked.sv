// tb_mcsr_clocked: self-checking test of the clocked MCSR at a reduced size
// (M x N = 4 x 3). The scan clock has a 400 ps period and a 150 ps low time,
// inside the rules T_emp (61 ps) < low time < T_full (244 ps) < period.
// Checks, against a reference vector of the scan path (bit 0 = SL(1,1),
// bit m*n-1 = SL(m,n)): one shift per sck cycle during insertion, capture of
// func_d in normal mode, the extracted bit sequence on sc_out (sampled just
// before each falling edge), and the time T_out from an sck fall to the
// change of sc_out (one asP* event plus T_DATA, 76 ps by default), and T_emp
// and T_full measured on the state of c_0 against the clock rules.
module tb_mcsr_clocked;
  timeunit 1ps;
  timeprecision 1ps;
  import mcsr_pkg::*;

  localparam int unsigned M      = 4;
  localparam int unsigned N      = 3;
  localparam int unsigned MN     = M * N;
  localparam int unsigned PERIOD = 400;
  localparam int unsigned LOW    = 150;

  logic                rst_n, sw, clk, sck, sc_in, sc_out;
  logic [M-1:0][N-1:0] func_d, func_q;

  mcsr_clocked #(.M(M), .N(N)) dut (
    .rst_n(rst_n), .sw(sw), .clk(clk), .sck(sck), .func_d(func_d),
    .func_q(func_q), .sc_in(sc_in), .sc_out(sc_out));

  int unsigned checks = 0, failures = 0, tout_seen = 0;
  logic [MN-1:0] model;
  time t_fall;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One scan clock cycle: sample sc_out, fall, hold low, rise, then change
  // sc_in for the next cycle (after T_emp, before the next fall).
  task automatic sck_cycle(input logic next_in, output logic got);
    got = sc_out;
    sck = 0; t_fall = $time;
    model = {model[MN-2:0], sc_in};
    #(LOW) sck = 1;
    #(PERIOD / 4) sc_in = next_in;
    #(PERIOD - LOW - PERIOD / 4);
  endtask

  always @(sc_out) begin
    if (rst_n && sw && $time > t_fall && $time - t_fall < PERIOD) begin
      check($time - t_fall == T_EVENT_PS + T_DATA_PS, $sformatf("T_out = %0d ps", $time - t_fall));
      tout_seen++;
    end
  end

  // T_emp: sck fall -> c_0 full (s_0 falls); T_full: sck fall -> c_0 empty
  // again (s_0 rises). Expected one event and n+1 events.
  int unsigned temp_seen = 0, tfull_seen = 0;
  always @(negedge dut.u_ring.s[0]) begin
    if (rst_n && sw && $time > t_fall) begin
      check($time - t_fall == T_EVENT_PS, $sformatf("T_emp = %0d ps", $time - t_fall));
      check($time - t_fall < LOW, "T_emp < T_pulse");
      temp_seen++;
    end
  end
  always @(posedge dut.u_ring.s[0]) begin
    if (rst_n && sw && $time > t_fall) begin
      check($time - t_fall == cycle_ps(N), $sformatf("T_full = %0d ps", $time - t_fall));
      check(LOW < $time - t_fall && $time - t_fall < PERIOD, "T_pulse < T_full < T_cycle");
      tfull_seen++;
    end
  end

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    logic [MN-1:0] vec;
    rst_n = 1; sw = 1; clk = 0; sck = 1; sc_in = 0; func_d = '0; t_fall = 0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    #100;
    model = func_q;
    for (int k = 0; k < MN; k++) vec[k] = 1'($urandom);

    // ---- insertion: sc_in carries vec[k] at the k-th falling edge
    sc_in = vec[0];
    for (int k = 0; k < MN; k++) begin
      sck_cycle((k + 1 < MN) ? vec[k + 1] : 1'b0, b);
      check(b == model[MN-1] || k == 0, "scan-out during insertion");
      check(func_q == model, $sformatf("scan path after cycle %0d", k));
    end
    for (int k = 0; k < MN; k++) check(func_q[M-1 - k / N][N-1 - k % N] == vec[k], $sformatf("bit %0d position", k));

    // ---- evaluation
    func_d = {(MN+31)/32{$urandom}};
    sw = 0;
    #10 clk = 1;
    #20 clk = 0;
    #10 sw = 1;
    check(func_q == func_d, "normal-mode capture");
    model = func_q;

    // ---- extraction: read sc_out before every fall
    for (int k = 0; k < MN; k++) begin
      logic expb;
      expb = model[MN-1];
      sck_cycle(1'b1, b);
      check(b == expb, $sformatf("extracted bit %0d", k));
    end
    check(func_q == model, "path refilled from sc_in");
    check(tout_seen > 0, "T_out measured");
    check(temp_seen == 2 * MN && tfull_seen == 2 * MN, "T_emp and T_full measured every cycle");
    $display("tout_seen=%0d", tout_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
