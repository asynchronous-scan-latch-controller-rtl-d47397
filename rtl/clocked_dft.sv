// clocked_dft: scan structure of a circuit whose scan paths are built from
// sub-circuits, each with its own clocked MCSR.
//
// The circuit has P scan paths, SI[p] -> SO[p]. Path p is a serial chain of
// NSUB[p] sub-circuits ("subCUTs", at most S); subCUT k of path p is an
// mcsr_clocked block of SUB_M_OF[p*S+k] x SUB_N_OF[p*S+k] single-latch scan
// cells whose sc_out feeds the next subCUT's sc_in. Paths may differ in the
// number and the size of their subCUTs. All subCUTs share the system clock
// `clk`, the mode select `sw` and the scan clock `sck`, so the row-enable
// wires of each MCSR stay local to its subCUT instead of running across the
// whole die. One falling edge of sck shifts every path by one bit.
//
// Why chaining works: in a subCUT, c_0 samples sc_in within one asP* event
// after the sck fall, while the previous subCUT's last cell changes only when
// its own en_n fires, one event later, whatever the sizes of the two; every
// subCUT therefore takes the bit its neighbour held before the edge. The sck
// rules of mcsr_clocked apply to the extremes over all subCUTs: the longest
// T_out below the low time, the low time below the shortest T_full (set by
// the smallest n), the longest T_full (largest n) below the period.
//
// Functional rows: func_d/func_q[p][k] is the register array of subCUT k of
// path p (k = 0 is nearest SI), sized for the largest subCUT, SUB_M x SUB_N;
// subCUT (p,k) uses elements [i][j] with i < SUB_M_OF[p*S+k] and
// j < SUB_N_OF[p*S+k]; the other func_q bits are 0 and the other func_d bits
// are ignored. The sub-circuit structure follows the published clocked-MCSR
// application; the default numbers and sizes are this design's choices.
module clocked_dft #(
  parameter int unsigned P       = 2,   // number of scan paths
  parameter int unsigned S       = 2,   // largest number of subCUTs in a path
  parameter int unsigned SUB_M   = mcsr_pkg::M_DEFAULT,  // largest subCUT m
  parameter int unsigned SUB_N   = mcsr_pkg::N_DEFAULT,  // largest subCUT n
  parameter int unsigned NSUB     [P]    = '{default: S},
  parameter int unsigned SUB_M_OF [P*S]  = '{default: SUB_M},  // [p*S+k]
  parameter int unsigned SUB_N_OF [P*S]  = '{default: SUB_N},  // [p*S+k]
  parameter int unsigned T_DATA  = mcsr_pkg::T_DATA_PS,
  parameter int unsigned T_PULSE = mcsr_pkg::T_PULSE_PS,
  parameter int unsigned T_STATE = mcsr_pkg::T_STATE_PS
) (
  input  logic                                      rst_n,
  input  logic                                      sw,      // 1: test mode
  input  logic                                      clk,     // system clock
  input  logic                                      sck,     // scan clock
  input  logic [P-1:0]                              si,      // scan-path inputs
  output logic [P-1:0]                              so,      // scan-path outputs
  input  logic [P-1:0][S-1:0][SUB_M-1:0][SUB_N-1:0] func_d,
  output logic [P-1:0][S-1:0][SUB_M-1:0][SUB_N-1:0] func_q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [P-1:0][S:0] chain;

  for (genvar p = 0; p < P; p++) begin : g_path
    assign chain[p][0] = si[p];
    for (genvar k = 0; k < S; k++) begin : g_sub
      if (k < NSUB[p]) begin : g_used
        localparam int unsigned MK = SUB_M_OF[p*S+k];
        localparam int unsigned NK = SUB_N_OF[p*S+k];
        logic [MK-1:0][NK-1:0] fd, fq;

        for (genvar i = 0; i < SUB_M; i++) begin : g_col
          if (i < MK) begin : g_in
            assign fd[i] = func_d[p][k][i][NK-1:0];
            if (NK < SUB_N) begin : g_pad
              assign func_q[p][k][i] = {{(SUB_N - NK){1'b0}}, fq[i]};
            end else begin : g_full
              assign func_q[p][k][i] = fq[i];
            end
          end else begin : g_out
            assign func_q[p][k][i] = '0;
          end
        end

        mcsr_clocked #(
          .M       (MK),
          .N       (NK),
          .T_DATA  (T_DATA),
          .T_PULSE (T_PULSE),
          .T_STATE (T_STATE)
        ) u_sub (
          .rst_n  (rst_n),
          .sw     (sw),
          .clk    (clk),
          .sck    (sck),
          .func_d (fd),
          .func_q (fq),
          .sc_in  (chain[p][k]),
          .sc_out (chain[p][k+1])
        );
      end else begin : g_absent
        assign chain[p][k+1] = chain[p][k];
        assign func_q[p][k]  = '0;
      end
    end
    assign so[p] = chain[p][S];
  end

  // Every subCUT must fit the port arrays.
  initial begin
    for (int p = 0; p < P; p++) begin
      assert (NSUB[p] >= 1 && NSUB[p] <= S) else $error("clocked_dft: NSUB out of range");
      for (int k = 0; k < S; k++)
        assert (SUB_M_OF[p*S+k] <= SUB_M && SUB_N_OF[p*S+k] <= SUB_N && SUB_M_OF[p*S+k] > 0 && SUB_N_OF[p*S+k] > 0)
          else $error("clocked_dft: subCUT size out of range");
    end
  end

endmodule
