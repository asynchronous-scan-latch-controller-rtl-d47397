// asp_ctrl: behavioural model of one asP* (asynchronous symmetric pulse
// protocol) stage controller, as built from GasP-style self-timed circuits.
// This is a behavioural model, not synthesizable logic: a GasP stage works
// through the delays of its own gates, which only a timed model can show.
//
// A stage holds one state bit, `s`: HIGH means "empty" (the latch row it
// controls may be overwritten), LOW means "full" (the row holds data that its
// successor has not yet taken). The stage owns the event that fills it: when
// `ready` is high (every predecessor stage is full and every other stage that
// the same event fills is empty) and the stage itself is empty, it
//   1. waits T_DATA for the predecessor's data to arrive at its latches,
//   2. drives `en` high for T_PULSE (the latch gate of its row),
//   3. T_STATE after the pulse ends, becomes full (s falls) and raises `done`
//      for one time unit, which makes every predecessor empty (their s rises).
// A rising edge on `drain` (the `done` of the successor event) makes the
// stage empty again. The three steps correspond to the three concurrent
// asP* events; their order satisfies the published constraints: the pulse
// starts after the data has arrived, and both state changes happen after the
// pulse has finished. Joins and forks are built outside the stage by ANDing
// the participants' states into `ready` and fanning `done` out to several
// predecessors.
//
// Interface timing: `ready` must stay high from the moment the event starts
// until `done` (an assertion checks this); `drain` must only come while the
// stage is full. `rst_n` low puts the stage into INIT_FULL; it must be
// applied once before use (the stage stays idle until then) and only while
// no event is running. Delays are in picoseconds; their defaults sum to
// one 61 ps event (see mcsr_pkg), which is this design's own calibration.
module asp_ctrl #(
  parameter bit          INIT_FULL = 1'b0,
  parameter int unsigned T_DATA    = mcsr_pkg::T_DATA_PS,
  parameter int unsigned T_PULSE   = mcsr_pkg::T_PULSE_PS,
  parameter int unsigned T_STATE   = mcsr_pkg::T_STATE_PS
) (
  input  logic rst_n,  // asynchronous initialisation, active low
  input  logic ready,  // predecessors full and co-filled stages empty
  input  logic drain,  // rising edge: successor took the data, become empty
  output logic en,     // latch enable pulse for this stage's row
  output logic done,   // one-unit pulse: this stage is now full
  output logic s       // state: 1 = empty, 0 = full
);
  timeunit 1ps;
  timeprecision 1ps;

  // The state is the parity of two toggles, so that the filling event and
  // the draining edge each have a single writer.
  logic fill_t;
  logic drain_t;
  logic busy;

  // Both processes stay idle until rst_n has been low once.
  always begin : drain_track
    drain_t = 1'b0;
    wait (!rst_n);
    wait (rst_n);
    while (rst_n) begin
      @(posedge drain or negedge rst_n);
      if (rst_n) begin
        // A stage may only be drained while it is full.
        assert (!s)
          else $error("asp_ctrl: drained while empty");
        drain_t = ~drain_t;
      end
    end
  end

  assign s = ~(INIT_FULL ^ fill_t ^ drain_t);

  always begin : event_gen
    en     = 1'b0;
    done   = 1'b0;
    busy   = 1'b0;
    fill_t = 1'b0;
    wait (!rst_n);
    wait (rst_n);
    while (rst_n) begin
      wait (!rst_n || (ready && s));
      if (rst_n) begin
        busy = 1'b1;
        #(T_DATA)  en = 1'b1;
        #(T_PULSE) en = 1'b0;
        #(T_STATE);
        busy   = 1'b0;
        fill_t = ~fill_t;
        done   = 1'b1;
        #1 done = 1'b0;
      end
    end
  end

  // asP* rule: once an event has started, its participants may not change
  // until it completes.
  always @(negedge ready) begin
    if (rst_n) begin
      assert (!busy)
        else $error("asp_ctrl: ready withdrawn during an event");
    end
  end

endmodule
