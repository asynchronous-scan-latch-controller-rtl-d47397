// mcsr_ring: the core of the multi-clocked scan register (MCSR): an m x (n+1)
// array of single-latch scan cells and a ring of n+1 asP* controllers that
// shift it one bit at a time without any global shift clock.
//
// Array and scan path. Cell SL(i,j) (column i = 1..m, row j = 0..n) is
// element [i-1][j] of the cell array. The scan path runs up each column and
// on to the bottom of the next: SL(i,j-1) -> SL(i,j) and SL(i,n) -> SL(i+1,0);
// `scan_in` feeds SL(1,0) and SL(m,n) drives `sc_last`. Rows 1..n are the
// registers of the circuit under test (ports func_d / func_q, element
// [i-1][j-1] for SL(i,j)); row 0 is an extra latch per column that is needed
// only while shifting.
//
// Control. Controller c_j gates row j with its pulse en[j]. Controllers c_1..c_n
// form a linear asP* pipeline (c_j fires when c_(j-1) is full and c_j empty).
// c_0 closes the ring: it is a join of the input environment (in_full) and c_n,
// and c_n forks into c_0 and the output environment, so c_0 fires only when
// c_in and c_n are full and c_0 and c_out are empty. Its `done` empties both
// c_in (in_drain) and c_n; the caller empties c_out. After rst_n, c_0 is empty
// and c_1..c_n are full, so the ring holds exactly one "bubble". Each firing of
// c_0 sends the bubble backwards round the ring (c_n, c_(n-1), ..., c_1); the
// rows therefore load one after the other, each from a row that is still
// holding, and the whole path moves forward by one bit with one latch per bit.
// At rest (c_0 empty) row 0 duplicates row 1, so the m*n cells of rows 1..n
// form an m*n-bit shift register whose last bit is SL(m,n).
//
// Timing: one shift takes n+1 asP* events; with the default controller delays
// that is 61*(n+1) ps. en[0] is brought out because the output environment
// loads its scan-out latch with the same pulse that loads row 0.
// The array, the scan order, the join/fork ring and its initial state follow
// the published MCSR; the packed-array port layout is this design's choice.
module mcsr_ring #(
  parameter int unsigned M       = mcsr_pkg::M_DEFAULT,
  parameter int unsigned N       = mcsr_pkg::N_DEFAULT,
  parameter int unsigned T_DATA  = mcsr_pkg::T_DATA_PS,
  parameter int unsigned T_PULSE = mcsr_pkg::T_PULSE_PS,
  parameter int unsigned T_STATE = mcsr_pkg::T_STATE_PS
) (
  input  logic                  rst_n,     // controller initialisation
  input  logic                  sw,        // 1: test mode, 0: normal mode
  input  logic                  clk,       // normal-mode latch gate
  input  logic [M-1:0][N-1:0]   func_d,    // functional inputs of rows 1..n
  output logic [M-1:0][N-1:0]   func_q,    // latch outputs of rows 1..n
  input  logic                  scan_in,   // scan input to SL(1,0)
  input  logic                  in_full,   // c_in is full (scan_in valid)
  input  logic                  out_empty, // c_out is empty (may be loaded)
  output logic                  in_drain,  // pulse: c_in and c_n emptied by c_0
  output logic                  sc_last,   // output of SL(m,n)
  output logic [N:0]            en,        // row enable pulses en_0..en_n
  output logic [N:0]            s          // controller states, 1 = empty
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N:0]            done;
  logic [N:0]            ready;
  logic [N:0]            drain;
  logic [M-1:0][N:0]     q;

  // ---------------------------------------------------------------- controllers
  always_comb begin
    // c_0: join of c_in and c_n, co-filled with c_out.
    ready[0] = in_full & ~s[N] & out_empty;
    drain[0] = done[1];
    for (int j = 1; j <= N; j++) begin
      ready[j] = ~s[j-1];
      drain[j] = (j == N) ? done[0] : done[j+1];
    end
  end

  assign in_drain = done[0];

  for (genvar j = 0; j <= N; j++) begin : g_ctrl
    asp_ctrl #(
      .INIT_FULL (j != 0),
      .T_DATA    (T_DATA),
      .T_PULSE   (T_PULSE),
      .T_STATE   (T_STATE)
    ) u_c (
      .rst_n (rst_n),
      .ready (ready[j]),
      .drain (drain[j]),
      .en    (en[j]),
      .done  (done[j]),
      .s     (s[j])
    );
  end

  // ---------------------------------------------------------------- scan cells
  for (genvar i = 0; i < M; i++) begin : g_col
    // Row 0 exists only for shifting: always in test mode, no functional input.
    scan_latch u_sl0 (
      .sw    (1'b1),
      .clk   (1'b0),
      .en    (en[0]),
      .d     (1'b0),
      .si    ((i == 0) ? scan_in : q[(i == 0) ? 0 : i-1][N]),
      .q     (q[i][0])
    );
    for (genvar j = 1; j <= N; j++) begin : g_row
      scan_latch u_sl (
        .sw    (sw),
        .clk   (clk),
        .en    (en[j]),
        .d     (func_d[i][j-1]),
        .si    (q[i][j-1]),
        .q     (q[i][j])
      );
      assign func_q[i][j-1] = q[i][j];
    end
  end

  assign sc_last = q[M-1][N];

endmodule
