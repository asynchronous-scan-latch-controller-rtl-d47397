// tb_clocked_dft: self-checking test of the sub-circuit scan structure with
// paths of different make-up: path 1 has three subCUTs (3x4, 2x2, 1x3),
// path 2 has two (2x1, 3x4), so the paths are 19 and 14 bits long. The scan
// clock obeys the rules over all subCUTs: low time 100 ps lies between the
// longest T_out (76 ps) and the shortest T_full (2 events = 122 ps, n = 1),
// and the 400 ps period exceeds the longest T_full (5 events = 305 ps).
// A reference vector per path (bit 0 = first cell after SI) checks one shift
// per sck cycle across subCUT boundaries of different sizes, capture in
// normal mode, the bits arriving at SO, and that unused func_q bits stay 0.
module tb_clocked_dft;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned P      = 2;
  localparam int unsigned S      = 3;
  localparam int unsigned SM     = 3;
  localparam int unsigned SN     = 4;
  localparam int unsigned NSUB [P]   = '{3, 2};
  localparam int unsigned MOF  [P*S] = '{3, 2, 1, 2, 3, 1};
  localparam int unsigned NOF  [P*S] = '{4, 2, 3, 1, 4, 1};
  localparam int unsigned LMAX   = S * SM * SN;
  localparam int unsigned PERIOD = 400;
  localparam int unsigned LOW    = 100;

  logic rst_n, sw, clk, sck;
  logic [P-1:0] si, so;
  logic [P-1:0][S-1:0][SM-1:0][SN-1:0] func_d, func_q;

  clocked_dft #(.P(P), .S(S), .SUB_M(SM), .SUB_N(SN), .NSUB(NSUB),
                .SUB_M_OF(MOF), .SUB_N_OF(NOF)) dut (
    .rst_n(rst_n), .sw(sw), .clk(clk), .sck(sck), .si(si), .so(so),
    .func_d(func_d), .func_q(func_q));

  int unsigned checks = 0, failures = 0, boundary_moves = 0;
  int unsigned len [P];
  logic [P-1:0][LMAX-1:0] model;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Path contents in scan order, gathered from the padded func_q arrays.
  function automatic logic [LMAX-1:0] gather(input int p);
    logic [LMAX-1:0] v;
    int unsigned idx;
    v = '0;
    idx = 0;
    for (int k = 0; k < NSUB[p]; k++)
      for (int i = 0; i < MOF[p*S+k]; i++)
        for (int j = 0; j < NOF[p*S+k]; j++) begin
          v[idx] = func_q[p][k][i][j];
          idx++;
        end
    return v;
  endfunction

  function automatic bit unused_zero();
    for (int p = 0; p < P; p++)
      for (int k = 0; k < S; k++)
        for (int i = 0; i < SM; i++)
          for (int j = 0; j < SN; j++)
            if ((k >= NSUB[p] || i >= MOF[p*S+k] || j >= NOF[p*S+k]) && func_q[p][k][i][j])
              return 1'b0;
    return 1'b1;
  endfunction

  task automatic sck_cycle(input logic [P-1:0] next_si);
    for (int p = 0; p < P; p++) begin
      check(so[p] == model[p][len[p]-1], $sformatf("SO%0d before fall", p + 1));
      if (model[p][MOF[p*S]*NOF[p*S]-1] != model[p][MOF[p*S]*NOF[p*S]]) boundary_moves++;
      model[p] = {model[p][LMAX-2:0], si[p]};
      for (int b = len[p]; b < LMAX; b++) model[p][b] = 1'b0;
    end
    sck = 0;
    #(LOW) sck = 1;
    #(PERIOD / 4) si = next_si;
    #(PERIOD - LOW - PERIOD / 4);
    for (int p = 0; p < P; p++) check(gather(p) == model[p], $sformatf("path %0d contents", p + 1));
  endtask

  initial begin : watchdog
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned lmax_used;
    rst_n = 1; sw = 1; clk = 0; sck = 1; si = '0; func_d = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    #100;
    lmax_used = 0;
    for (int p = 0; p < P; p++) begin
      len[p] = 0;
      for (int k = 0; k < NSUB[p]; k++) len[p] += MOF[p*S+k] * NOF[p*S+k];
      if (len[p] > lmax_used) lmax_used = len[p];
      model[p] = gather(p);
    end
    check(len[0] == 19 && len[1] == 14, "path lengths");

    // insertion of a random vector into every path
    si = P'($urandom);
    for (int k = 0; k < lmax_used; k++) sck_cycle(P'($urandom));

    // evaluation
    func_d = {($bits(func_d)+31)/32{$urandom}};
    sw = 0;
    #10 clk = 1;
    #20 clk = 0;
    #10 sw = 1;
    for (int p = 0; p < P; p++) for (int k = 0; k < NSUB[p]; k++)
      for (int i = 0; i < MOF[p*S+k]; i++) for (int j = 0; j < NOF[p*S+k]; j++)
        check(func_q[p][k][i][j] == func_d[p][k][i][j], "normal-mode capture");
    check(unused_zero(), "unused func_q bits are 0");
    for (int p = 0; p < P; p++) model[p] = gather(p);

    // extraction (and a new vector in)
    for (int k = 0; k < lmax_used; k++) sck_cycle(P'($urandom));
    check(unused_zero(), "unused func_q bits still 0");

    check(boundary_moves > 0, "data crossed a subCUT boundary");
    $display("boundary_moves=%0d", boundary_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
