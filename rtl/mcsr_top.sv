// mcsr_top: the two scan structures built from multi-clocked scan registers,
// side by side.
//
//   * u_async (mcsr): one M x N MCSR with its asynchronous input and output
//     environments (c_in / c_out handshakes), the self-timed form in which
//     the scheme was evaluated (m = 32, n = 16).
//   * u_dft (clocked_dft): P scan paths of S subCUTs, each subCUT a clocked
//     MCSR shifted by the common scan clock sck.
//
// The two share only rst_n, sw and clk; every other port of each is brought
// out with an a_ (asynchronous MCSR) or c_ (clocked structure) prefix. See the
// two blocks for the protocols and the timing rules.
module mcsr_top #(
  parameter int unsigned M     = mcsr_pkg::M_DEFAULT,
  parameter int unsigned N     = mcsr_pkg::N_DEFAULT,
  parameter int unsigned P     = 2,
  parameter int unsigned S     = 2,
  parameter int unsigned SUB_M = mcsr_pkg::M_DEFAULT,
  parameter int unsigned SUB_N = mcsr_pkg::N_DEFAULT
) (
  input  logic                                      rst_n,
  input  logic                                      sw,
  input  logic                                      clk,
  // asynchronous MCSR
  input  logic [M-1:0][N-1:0]                       a_func_d,
  output logic [M-1:0][N-1:0]                       a_func_q,
  input  logic                                      a_sc_in,
  input  logic                                      a_in_put,
  input  logic                                      a_in_fix_full,
  output logic                                      a_in_full,
  output logic                                      a_sc_out,
  input  logic                                      a_out_take,
  input  logic                                      a_out_fix_empty,
  output logic                                      a_out_full,
  output logic [N:0]                                a_en,
  output logic [N:0]                                a_s,
  // clocked sub-circuit structure
  input  logic                                      c_sck,
  input  logic [P-1:0]                              c_si,
  output logic [P-1:0]                              c_so,
  input  logic [P-1:0][S-1:0][SUB_M-1:0][SUB_N-1:0] c_func_d,
  output logic [P-1:0][S-1:0][SUB_M-1:0][SUB_N-1:0] c_func_q
);
  timeunit 1ps;
  timeprecision 1ps;

  mcsr #(
    .M (M),
    .N (N)
  ) u_async (
    .rst_n         (rst_n),
    .sw            (sw),
    .clk           (clk),
    .func_d        (a_func_d),
    .func_q        (a_func_q),
    .sc_in         (a_sc_in),
    .in_put        (a_in_put),
    .in_fix_full   (a_in_fix_full),
    .in_full       (a_in_full),
    .sc_out        (a_sc_out),
    .out_take      (a_out_take),
    .out_fix_empty (a_out_fix_empty),
    .out_full      (a_out_full),
    .en            (a_en),
    .s             (a_s)
  );

  clocked_dft #(
    .P     (P),
    .S     (S),
    .SUB_M (SUB_M),
    .SUB_N (SUB_N)
  ) u_dft (
    .rst_n  (rst_n),
    .sw     (sw),
    .clk    (clk),
    .sck    (c_sck),
    .si     (c_si),
    .so     (c_so),
    .func_d (c_func_d),
    .func_q (c_func_q)
  );

endmodule
