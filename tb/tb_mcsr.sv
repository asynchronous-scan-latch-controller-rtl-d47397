// tb_mcsr: self-checking test of the asynchronous multi-clocked scan register
// with its input and output environments, at a reduced size (M x N = 4 x 3).
// A reference model keeps the m*n-bit scan path as a vector (bit 0 = SL(1,1),
// bit m*n-1 = SL(m,n), the same order as func_q) and checks:
//   - insertion of a random vector with c_out held empty, with a deliberate
//     pause of the input environment (the ring must wait: join at c_0),
//   - capture of func_d by one clk pulse in normal mode,
//   - extraction with c_in held full, including a pause of the output
//     environment (the ring must wait for c_out: fork at c_n),
//   - simultaneous insertion and extraction with both handshakes live,
//   - the free-running shift period, 61*(n+1) ps with default delays,
//   - the order of the row pulses in each shift: en_0, en_n, ..., en_1.
module tb_mcsr;
  timeunit 1ps;
  timeprecision 1ps;
  import mcsr_pkg::*;

  localparam int unsigned M  = 4;
  localparam int unsigned N  = 3;
  localparam int unsigned MN = M * N;

  logic                rst_n, sw, clk;
  logic [M-1:0][N-1:0] func_d, func_q;
  logic                sc_in, in_put, in_fix_full, in_full;
  logic                sc_out, out_take, out_fix_empty, out_full;
  logic [N:0]          en, s;

  mcsr #(.M(M), .N(N)) dut (
    .rst_n(rst_n), .sw(sw), .clk(clk), .func_d(func_d), .func_q(func_q),
    .sc_in(sc_in), .in_put(in_put), .in_fix_full(in_fix_full), .in_full(in_full),
    .sc_out(sc_out), .out_take(out_take), .out_fix_empty(out_fix_empty),
    .out_full(out_full), .en(en), .s(s));

  int unsigned checks = 0, failures = 0;
  int unsigned in_stalls = 0, out_stalls = 0, shifts = 0;
  logic [MN-1:0] model;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge en[0]) shifts++;

  // Order of the row enables within one shift: en_0 first, then the bubble
  // runs backwards: en_n, en_(n-1), ..., en_1, each one asP* event apart.
  int unsigned last_row = 1;
  time         last_t   = 0;
  int unsigned order_checks = 0;
  for (genvar j = 0; j <= N; j++) begin : g_order
    always @(posedge en[j]) begin
      int unsigned expect_prev;
      expect_prev = (j == 0) ? 1 : (j == N) ? 0 : j + 1;
      check(last_row == expect_prev, $sformatf("en_%0d after en_%0d", j, last_row));
      if (j != 0) begin
        check($time - last_t == T_EVENT_PS, $sformatf("en_%0d one event after en_%0d", j, last_row));
        order_checks++;
      end
      last_row = j;
      last_t   = $time;
    end
  end

  // Ring is at rest: c_0 empty, c_1..c_n full.
  function automatic bit at_rest();
    return s[0] && (s[N:1] == '0);
  endfunction

  task automatic wait_rest();
    #1;
    while (!at_rest() || in_full && !in_fix_full) #5;
    #5;
  endtask

  task automatic put_bit(input logic b);
    wait (!in_full);
    #2 sc_in = b;
    #2 in_put = 1;
    #1 in_put = 0;
  endtask

  task automatic take_bit(output logic b);
    wait (out_full);
    #2 b = sc_out;
    #1 out_take = 1;
    #1 out_take = 0;
  endtask

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    logic [MN-1:0] vec;
    time t0, t1;
    int unsigned sh0;

    rst_n = 1; sw = 1; clk = 0; func_d = '0; sc_in = 0; in_put = 0; out_take = 0;
    in_fix_full = 0; out_fix_empty = 1;
    #1 rst_n = 0;
    #20 rst_n = 1;
    #20;
    check(at_rest() && !in_full && !out_full, "initial state: c_0 empty, c_1..c_n full");
    model = func_q;

    // ---- insertion with a stalled input environment midway
    vec = {MN{1'b0}};
    for (int k = 0; k < MN; k++) vec[k] = 1'($urandom);
    for (int k = 0; k < MN; k++) begin
      if (k == MN / 2) begin
        wait_rest();
        sh0 = shifts;
        #3000;
        check(shifts == sh0 && at_rest(), "ring waits for c_in (input stall)");
        if (shifts == sh0) in_stalls++;
      end
      put_bit(vec[k]);
      model = {model[MN-2:0], vec[k]};
    end
    wait_rest();
    check(func_q == model, "scan path after insertion");
    for (int k = 0; k < MN; k++) check(func_q[M-1 - k / N][N-1 - k % N] == vec[k], $sformatf("bit %0d position", k));
    check(shifts == MN, "one c_0 event per inserted bit");

    // ---- evaluation: capture func_d in normal mode
    func_d = {(MN+31)/32{$urandom}};
    sw = 0;
    #10 clk = 1;
    #20 clk = 0;
    #10 sw = 1;
    check(func_q == func_d, "normal-mode capture");
    model = func_q;
    check(at_rest(), "ring untouched by normal mode");

    // ---- extraction with c_in held full and an output stall
    in_fix_full = 1; out_fix_empty = 0; sc_in = 0;
    for (int k = 0; k < MN; k++) begin
      if (k == 5) begin
        wait (out_full);
        #2000;
        sh0 = shifts;
        #2000;
        check(shifts == sh0 && out_full, "ring waits for c_out (output stall)");
        if (shifts == sh0) out_stalls++;
      end
      take_bit(b);
      check(b == model[MN-1], $sformatf("extracted bit %0d", k));
      model = {model[MN-2:0], 1'b0};
    end
    // One more shift is pending in the ring because c_in is held full; the
    // output stage holds its bit until taken.
    wait (out_full);
    in_fix_full = 0;
    take_bit(b);
    check(b == model[MN-1], "extra extracted bit");
    model = {model[MN-2:0], 1'b0};
    wait_rest();
    check(func_q == model, "scan path after extraction");

    // ---- both handshakes live: a new bit in for every bit out
    in_fix_full = 0; out_fix_empty = 0;
    for (int k = 0; k < MN + 3; k++) begin
      logic nb;
      nb = 1'($urandom);
      put_bit(nb);
      take_bit(b);
      check(b == model[MN-1], $sformatf("exchanged bit %0d", k));
      model = {model[MN-2:0], nb};
    end
    wait_rest();
    check(func_q == model, "scan path after exchange");

    // ---- free-running period: c_in held full, c_out held empty
    in_fix_full = 1; out_fix_empty = 1;
    @(posedge en[0]); t0 = $time;
    repeat (4) @(posedge en[0]);
    t1 = $time;
    check((t1 - t0) / 4 == cycle_ps(N), $sformatf("shift period %0d ps, expected %0d", (t1 - t0) / 4, cycle_ps(N)));
    @(negedge s[0]);
    in_fix_full = 0;
    wait_rest();

    check(order_checks > 0, "enable order observed");
    check(in_stalls == 1, "input stall exercised");
    check(out_stalls == 1, "output stall exercised");
    $display("shifts=%0d in_stalls=%0d out_stalls=%0d", shifts, in_stalls, out_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
