// tb_table1: reproduces the cycle-time and area table of the MCSR for
// m = 32 and n = 4, 8, 16, 32, 64. Five free-running MCSRs (c_in held full,
// c_out held empty) are simulated side by side; the period of en_0 of each is
// measured and compared with the published 0.13 um cycle times (within 1 %),
// and the area model m + 3(n+1) over m*n latch units is compared with the
// published overhead ratios (within 0.1 percentage point). It also checks the
// area bound 2*sqrt(3mn) + 3, reached at m = 3n, and that an MCSR of 512
// scan bits (m = 32, n = 16) costs less than 20 % of the L1/L2 overhead.
module tb_table1;
  timeunit 1ps;
  timeprecision 1ps;
  import mcsr_pkg::*;

  localparam int unsigned M = 32;
  localparam int unsigned NCFG = 5;
  localparam int unsigned NS      [NCFG] = '{4, 8, 16, 32, 64};
  localparam int unsigned PUB_PS  [NCFG] = '{305, 550, 1040, 2020, 3970};
  localparam int unsigned PUB_PML [NCFG] = '{367, 230, 162, 128, 111};  // 0.1 % units

  logic rst_n;
  int unsigned checks = 0, failures = 0;
  time period [NCFG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned N = NS[c];
    logic [M-1:0][N-1:0] fq;
    logic [N:0] en, s;
    logic in_full, sc_out, out_full;
    mcsr #(.M(M), .N(N)) u_mcsr (
      .rst_n(rst_n), .sw(1'b1), .clk(1'b0), .func_d('0), .func_q(fq),
      .sc_in(1'b1), .in_put(1'b0), .in_fix_full(1'b1), .in_full(in_full),
      .sc_out(sc_out), .out_take(1'b0), .out_fix_empty(1'b1), .out_full(out_full),
      .en(en), .s(s));
    initial begin
      time t0;
      period[c] = 0;
      #30;
      repeat (2) @(posedge en[0]);
      t0 = $time;
      repeat (4) @(posedge en[0]);
      period[c] = ($time - t0) / 4;
    end
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned best;
    rst_n = 1;
    #1 rst_n = 0;
    #20 rst_n = 1;
    wait (period[NCFG-1] != 0 && period[0] != 0 && period[1] != 0 && period[2] != 0 && period[3] != 0);
    $display("   n  period[ps]  published  area[%%x10]  published");
    for (int c = 0; c < NCFG; c++) begin
      $display("%4d  %10d  %9d  %10d  %9d", NS[c], period[c], PUB_PS[c],
               area_ratio_permille(M, NS[c]), PUB_PML[c]);
      check(period[c] == cycle_ps(NS[c]), $sformatf("n=%0d period equals model", NS[c]));
      check(100 * period[c] >= 99 * PUB_PS[c] && 100 * period[c] <= 101 * PUB_PS[c],
            $sformatf("n=%0d period within 1%% of published", NS[c]));
      check(area_ratio_permille(M, NS[c]) + 1 >= PUB_PML[c] && area_ratio_permille(M, NS[c]) <= PUB_PML[c] + 1,
            $sformatf("n=%0d area ratio", NS[c]));
    end
    // Lower bound of m + 3(n+1): 2*sqrt(3mn) + 3, equality at m = 3n.
    for (int n = 1; n <= 20; n++) begin
      check(area_mcsr(3 * n, n) == 6 * n + 3, $sformatf("bound reached at m=3n, n=%0d", n));
      for (int m = 1; m <= 80; m++)
        check(real'(area_mcsr(m, n)) >= 2.0 * $sqrt(3.0 * m * n) + 3.0 - 1e-9, "area bound");
    end
    check(area_ratio_permille(32, 16) < 200, "512 bits under 20 %");
    best = 1000;
    for (int m = 1; m <= 512; m++)
      if (512 % m == 0 && area_ratio_permille(m, 512 / m) < best) best = area_ratio_permille(m, 512 / m);
    $display("best ratio for 512 bits: %0d (0.1 %%)", best);
    check(best < 200, "best 512-bit split under 20 %");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
