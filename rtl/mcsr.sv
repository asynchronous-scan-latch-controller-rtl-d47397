// mcsr: multi-clocked scan register with its asynchronous input and output
// environments: the self-timed scan controller of an m x n block of
// single-latch scan cells.
//
// Structure: an mcsr_ring (m x (n+1) scan cells, controllers c_0..c_n) plus
// the two environment stages of the ring. c_in says whether a scan-in bit is
// waiting on `sc_in`; c_out says whether the scan-out latch SCout holds a bit
// that the tester has not taken yet. Each shift is one firing of c_0, which
// needs c_in and c_n full and c_0 and c_out empty; the same en_0 pulse that
// loads row 0 loads SCout from SL(m,n), and at its end c_in becomes empty
// and c_out full.
//
// Tester handshake (both sides are 2-state level/pulse signals):
//   input:  while in_full is low, set sc_in, then pulse in_put; keep sc_in
//           stable until in_full falls again. With in_fix_full high, c_in
//           reads as full all the time (used to shift data out; sc_in then
//           supplies the bits that refill the path).
//   output: when out_full is high, read sc_out and pulse out_take. With
//           out_fix_empty high, c_out reads as empty all the time and scan-out
//           bits are not waited for (used while shifting a vector in).
// Operation: rst_n, then insertion (m*n shifts with sw = 1), evaluation
// (sw = 0 and one clk pulse captures func_d into rows 1..n, then sw = 1),
// then extraction (m*n shifts; the first bit out is SL(m,n)).
//
// Timing: a shift takes 61*(n+1) ps with the default controller delays
// (0.305 ns ... 3.97 ns for n = 4 ... 64 at m = 32). sw may only change while
// the ring is at rest (c_0 empty) and clk is low.
// The ring, the environment stages, the operating sequence and the two fixed
// modes follow the published MCSR; the pulse/level tester handshake, the
// mode-pin names and the pulse-clocked environment state bits are this
// design's own choices.
module mcsr #(
  parameter int unsigned M       = mcsr_pkg::M_DEFAULT,
  parameter int unsigned N       = mcsr_pkg::N_DEFAULT,
  parameter int unsigned T_DATA  = mcsr_pkg::T_DATA_PS,
  parameter int unsigned T_PULSE = mcsr_pkg::T_PULSE_PS,
  parameter int unsigned T_STATE = mcsr_pkg::T_STATE_PS
) (
  input  logic                rst_n,          // initialisation, active low
  input  logic                sw,             // 1: test mode, 0: normal mode
  input  logic                clk,            // normal-mode latch gate
  input  logic [M-1:0][N-1:0] func_d,         // CUT logic -> rows 1..n
  output logic [M-1:0][N-1:0] func_q,         // rows 1..n -> CUT logic
  input  logic                sc_in,          // scan-in data
  input  logic                in_put,         // pulse: sc_in is valid
  input  logic                in_fix_full,    // hold c_in full
  output logic                in_full,        // c_in state (1 = full)
  output logic                sc_out,         // scan-out latch SCout
  input  logic                out_take,       // pulse: sc_out has been read
  input  logic                out_fix_empty,  // hold c_out empty
  output logic                out_full,       // c_out state (1 = full)
  output logic [N:0]          en,             // row enables (observation)
  output logic [N:0]          s               // controller states, 1 = empty
);
  timeunit 1ps;
  timeprecision 1ps;

  logic in_drain;
  logic sc_last;
  logic in_set_t,  in_clr_t;
  logic out_set_t, out_clr_t;

  // c_in: filled by the tester, emptied when c_0 takes the bit.
  always_ff @(posedge in_put or negedge rst_n) begin
    if (!rst_n) in_set_t <= 1'b0;
    else        in_set_t <= ~in_set_t;
  end

  always_ff @(posedge in_drain or negedge rst_n) begin
    if (!rst_n)            in_clr_t <= 1'b0;
    else if (!in_fix_full) in_clr_t <= ~in_clr_t;
  end

  assign in_full = (in_set_t ^ in_clr_t) | in_fix_full;

  // c_out: filled together with c_0, emptied by the tester.
  always_ff @(posedge in_drain or negedge rst_n) begin
    if (!rst_n)              out_set_t <= 1'b0;
    else if (!out_fix_empty) out_set_t <= ~out_set_t;
  end

  always_ff @(posedge out_take or negedge rst_n) begin
    if (!rst_n) out_clr_t <= 1'b0;
    else        out_clr_t <= ~out_clr_t;
  end

  assign out_full = (out_set_t ^ out_clr_t) & ~out_fix_empty;

  mcsr_ring #(
    .M       (M),
    .N       (N),
    .T_DATA  (T_DATA),
    .T_PULSE (T_PULSE),
    .T_STATE (T_STATE)
  ) u_ring (
    .rst_n     (rst_n),
    .sw        (sw),
    .clk       (clk),
    .func_d    (func_d),
    .func_q    (func_q),
    .scan_in   (sc_in),
    .in_full   (in_full),
    .out_empty (~out_full),
    .in_drain  (in_drain),
    .sc_last   (sc_last),
    .en        (en),
    .s         (s)
  );

  // SCout: a single latch in the output environment, opened by en_0.
  scan_latch u_scout (
    .sw  (1'b1),
    .clk (1'b0),
    .en  (en[0]),
    .d   (1'b0),
    .si  (sc_last),
    .q   (sc_out)
  );

  // Tester rules: no new bit while c_in is full, no take while c_out empty.
  always @(posedge in_put) begin
    if (rst_n) begin
      assert (!(in_set_t ^ in_clr_t))
        else $error("mcsr: in_put while c_in is full");
    end
  end

  always @(posedge out_take) begin
    if (rst_n) begin
      assert (out_set_t ^ out_clr_t)
        else $error("mcsr: out_take while c_out is empty");
    end
  end

endmodule
