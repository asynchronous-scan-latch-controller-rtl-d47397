// mcsr_clocked: multi-clocked scan register driven by an ordinary scan clock.
//
// The asynchronous input environment of the MCSR is replaced by an external
// clock `sck`: sck low stands for "c_in full" and sck high for "c_in empty",
// and the output environment stage is removed (c_out always empty). Each
// falling edge of sck therefore fires c_0 once, and the bubble then travels
// c_n -> c_1 on its own, shifting the m*n-bit scan path by one bit. sc_out is
// the output of the last cell SL(m,n); it changes while en_n is high.
//
// Clock rules (checked by assertions here and in asp_ctrl), with
// T_emp = time from the sck fall until c_0 is full (one asP* event, 61 ps by
// default) and T_full = time until c_0 is empty again (61*(n+1) ps):
//   T_emp < T_pulse < T_full   (sck low time)
//   T_full < T_cycle           (sck period)
//   sc_in must be stable from the sck fall until T_emp after it.
// Too short a low time withdraws c_0's request mid-event; too long a low time
// makes c_0 fire twice; both are reported. sc_out and the latches are ready
// before the next rising edge of sck.
//
// The sck/c_in substitution, the removal of c_out and the three timing rules
// follow the published clocked MCSR; everything else is as in mcsr_ring.
module mcsr_clocked #(
  parameter int unsigned M       = mcsr_pkg::M_DEFAULT,
  parameter int unsigned N       = mcsr_pkg::N_DEFAULT,
  parameter int unsigned T_DATA  = mcsr_pkg::T_DATA_PS,
  parameter int unsigned T_PULSE = mcsr_pkg::T_PULSE_PS,
  parameter int unsigned T_STATE = mcsr_pkg::T_STATE_PS
) (
  input  logic                rst_n,   // initialisation, active low
  input  logic                sw,      // 1: test mode, 0: normal mode
  input  logic                clk,     // normal-mode latch gate
  input  logic                sck,     // scan clock: one shift per falling edge
  input  logic [M-1:0][N-1:0] func_d,  // CUT logic -> rows 1..n
  output logic [M-1:0][N-1:0] func_q,  // rows 1..n -> CUT logic
  input  logic                sc_in,   // scan-in data
  output logic                sc_out   // output of SL(m,n)
);
  timeunit 1ps;
  timeprecision 1ps;

  logic       done0;
  logic [N:0] en;
  logic [N:0] s;
  logic       phase_t;
  logic       fired_t;

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
    .in_full   (~sck & sw),
    .out_empty (1'b1),
    .in_drain  (done0),
    .sc_last   (sc_out),
    .en        (en),
    .s         (s)
  );

  // One firing of c_0 per low phase of sck (T_pulse < T_full).
  always_ff @(negedge sck or negedge rst_n) begin
    if (!rst_n) phase_t <= 1'b0;
    else        phase_t <= ~phase_t;
  end

  always_ff @(posedge done0 or negedge rst_n) begin
    if (!rst_n) fired_t <= 1'b0;
    else begin
      assert (fired_t != phase_t)
        else $error("mcsr_clocked: sck low too long, c_0 fired twice");
      fired_t <= phase_t;
    end
  end

  // The previous shift must be complete when sck falls (T_full < T_cycle).
  always @(negedge sck) begin
    if (rst_n && sw) begin
      assert (s[0] && !s[N])
        else $error("mcsr_clocked: sck period shorter than T_full");
    end
  end

endmodule
