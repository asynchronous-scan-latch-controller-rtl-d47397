// tb_mcsr_top: end-to-end test of the whole design at its default size:
// the asynchronous 32 x 16 MCSR (512 scan bits) and the clocked structure of
// 2 paths x 2 subCUTs of 32 x 16 (1024 bits per path), run together through
// one complete test: insertion of a random vector into both, one normal-mode
// capture with a shared clk pulse, and extraction from both. Then the
// asynchronous MCSR runs a looped scan path (scan-out fed back to scan-in)
// preloaded with 1010..., which must come back unchanged after a full turn,
// and its free-running shift period is measured against the 61*(n+1) ps
// model (1.037 ns for n = 16; the published figure is 1.04 ns).
// Every mechanism is counted and must occur: input stall (join waits for
// c_in), output stall (fork waits for c_out), c_in held full, c_out held
// empty, normal-mode capture, clocked shifts, subCUT boundary crossings.
module tb_mcsr_top;
  timeunit 1ps;
  timeprecision 1ps;
  import mcsr_pkg::*;

  localparam int unsigned M      = M_DEFAULT;
  localparam int unsigned N      = N_DEFAULT;
  localparam int unsigned MN     = M * N;
  localparam int unsigned P      = 2;
  localparam int unsigned S      = 2;
  localparam int unsigned L      = S * M * N;
  localparam int unsigned PERIOD = 1400;   // > T_full = 1037 ps
  localparam int unsigned LOW    = 500;    // T_emp = 61 ps < 500 < T_full

  logic rst_n, sw, clk;
  logic [M-1:0][N-1:0] a_func_d, a_func_q;
  logic a_sc_in, a_in_put, a_in_fix_full, a_in_full;
  logic a_sc_out, a_out_take, a_out_fix_empty, a_out_full;
  logic [N:0] a_en, a_s;
  logic c_sck;
  logic [P-1:0] c_si, c_so;
  logic [P-1:0][S-1:0][M-1:0][N-1:0] c_func_d, c_func_q;

  mcsr_top dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned n_in_stall = 0, n_out_stall = 0, n_fix_full = 0, n_fix_empty = 0;
  int unsigned n_capture = 0, n_ck_shift = 0, n_boundary = 0, n_async_shift = 0;
  logic [MN-1:0] amodel;
  logic [P-1:0][L-1:0] cmodel;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge a_en[0]) begin
    n_async_shift++;
    if (a_in_fix_full)   n_fix_full++;
    if (a_out_fix_empty) n_fix_empty++;
  end

  function automatic bit a_rest();
    return a_s[0] && (a_s[N:1] == '0);
  endfunction

  task automatic a_wait_rest();
    #1;
    while (!a_rest() || a_in_full && !a_in_fix_full) #5;
    #5;
  endtask

  task automatic a_put(input logic b);
    wait (!a_in_full);
    #2 a_sc_in = b;
    #2 a_in_put = 1;
    #1 a_in_put = 0;
  endtask

  task automatic a_take(output logic b);
    wait (a_out_full);
    #2 b = a_sc_out;
    #1 a_out_take = 1;
    #1 a_out_take = 0;
  endtask

  task automatic sck_cycle(input logic [P-1:0] next_si);
    for (int p = 0; p < P; p++) begin
      check(c_so[p] == cmodel[p][L-1], "SO before fall");
      if (cmodel[p][M*N-1] != cmodel[p][M*N]) n_boundary++;
      cmodel[p] = {cmodel[p][L-2:0], c_si[p]};
    end
    c_sck = 0;
    #(LOW) c_sck = 1;
    #(PERIOD / 4) c_si = next_si;
    #(PERIOD - LOW - PERIOD / 4);
    n_ck_shift++;
  endtask

  initial begin : watchdog
    #100_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b;
    time t0, t1;
    int unsigned sh0;

    rst_n = 1; sw = 1; clk = 0;
    a_func_d = '0; a_sc_in = 0; a_in_put = 0; a_out_take = 0;
    a_in_fix_full = 0; a_out_fix_empty = 1;
    c_sck = 1; c_si = '0; c_func_d = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    #100;
    amodel = a_func_q;
    for (int p = 0; p < P; p++) cmodel[p] = c_func_q[p];

    // ---------------------------------------------------------- insertion
    fork
      begin : a_insert
        for (int k = 0; k < MN; k++) begin
          logic nb;
          if (k == 100) begin
            a_wait_rest();
            sh0 = n_async_shift;
            #5000;
            check(n_async_shift == sh0 && a_rest(), "async ring waits for c_in");
            if (n_async_shift == sh0) n_in_stall++;
          end
          nb = 1'($urandom);
          a_put(nb);
          amodel = {amodel[MN-2:0], nb};
        end
        a_wait_rest();
        check(a_func_q == amodel, "async path after insertion");
      end
      begin : c_insert
        c_si = P'($urandom);
        for (int k = 0; k < L; k++) sck_cycle(P'($urandom));
        for (int p = 0; p < P; p++) check(c_func_q[p] == cmodel[p], "clocked path after insertion");
      end
    join

    // ---------------------------------------------------------- capture
    a_func_d = {(MN+31)/32{$urandom}};
    c_func_d = {($bits(c_func_d)+31)/32{$urandom}};
    sw = 0;
    #10 clk = 1;
    #20 clk = 0;
    #10 sw = 1;
    check(a_func_q == a_func_d, "async capture");
    check(c_func_q == c_func_d, "clocked capture");
    if (a_func_q == a_func_d && c_func_q == c_func_d) n_capture++;
    amodel = a_func_q;
    for (int p = 0; p < P; p++) cmodel[p] = c_func_q[p];

    // ---------------------------------------------------------- extraction
    fork
      begin : a_extract
        a_in_fix_full = 1; a_out_fix_empty = 0; a_sc_in = 0;
        for (int k = 0; k < MN; k++) begin
          if (k == 200) begin
            wait (a_out_full);
            #3000;
            sh0 = n_async_shift;
            #3000;
            check(n_async_shift == sh0 && a_out_full, "async ring waits for c_out");
            if (n_async_shift == sh0) n_out_stall++;
          end
          a_take(b);
          check(b == amodel[MN-1], "async extracted bit");
          amodel = {amodel[MN-2:0], 1'b0};
        end
        wait (a_out_full);
        a_in_fix_full = 0;
        a_take(b);
        check(b == amodel[MN-1], "async last pending bit");
        amodel = {amodel[MN-2:0], 1'b0};
        a_wait_rest();
        check(a_func_q == amodel, "async path after extraction");
      end
      begin : c_extract
        for (int k = 0; k < L; k++) sck_cycle(P'($urandom));
        for (int p = 0; p < P; p++) check(c_func_q[p] == cmodel[p], "clocked path after extraction");
      end
    join

    // ---------------------------------------------------------- looped path
    // Load 1010..., then feed each scan-out bit straight back in, starting
    // the loop with one seed bit 0. After MN shifts the register holds the
    // seed followed by the first MN-1 bits of the pattern.
    a_out_fix_empty = 1;
    for (int k = 0; k < MN; k++) begin
      a_put(1'(k % 2 == 0));
      amodel = {amodel[MN-2:0], 1'(k % 2 == 0)};
    end
    a_wait_rest();
    a_out_fix_empty = 0;
    begin
      logic [MN-1:0] start;
      logic prev;
      start = amodel;
      prev  = 1'b0;  // seed bit that starts the loop
      a_put(prev);
      for (int k = 0; k < MN; k++) begin
        a_take(b);
        check(b == amodel[MN-1], "looped bit");
        amodel = {amodel[MN-2:0], prev};
        prev   = b;
        if (k < MN - 1) a_put(b);
      end
      a_wait_rest();
      check(a_func_q == amodel, "looped path contents");
      check(a_func_q == {1'b0, start[MN-1:1]}, "pattern rotated by one turn");
    end

    // ---------------------------------------------------------- cycle time
    a_in_fix_full = 1; a_out_fix_empty = 1;
    @(posedge a_en[0]); t0 = $time;
    repeat (8) @(posedge a_en[0]);
    t1 = $time;
    check((t1 - t0) / 8 == cycle_ps(N), $sformatf("shift period %0d ps", (t1 - t0) / 8));
    // Published cycle time for n = 16: 1.04 ns; accept 1 %.
    check((t1 - t0) / 8 > 1030 && (t1 - t0) / 8 < 1050, "period matches published 1.04 ns");
    @(negedge a_s[0]);
    a_in_fix_full = 0;
    a_wait_rest();

    // ---------------------------------------------------------- coverage
    $display("async shifts=%0d in_stall=%0d out_stall=%0d fix_full=%0d fix_empty=%0d capture=%0d",
             n_async_shift, n_in_stall, n_out_stall, n_fix_full, n_fix_empty, n_capture);
    $display("clocked shifts=%0d boundary crossings=%0d period=%0d ps", n_ck_shift, n_boundary, (t1 - t0) / 8);
    check(n_in_stall > 0,  "input stall happened");
    check(n_out_stall > 0, "output stall happened");
    check(n_fix_full > 0,  "c_in held full happened");
    check(n_fix_empty > 0, "c_out held empty happened");
    check(n_capture > 0,   "capture happened");
    check(n_ck_shift == 2 * L, "clocked shifts happened");
    check(n_boundary > 0,  "subCUT boundary crossing happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
