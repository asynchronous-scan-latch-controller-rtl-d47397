// tb_asp_ctrl: self-checking test of the asP* stage controller.
// Builds a five-stage linear asP* FIFO (controllers c1..c5, each gating an
// 8-bit latch register) between a source and a sink played by the testbench.
// Checks: data arrives at the sink complete and in order; each enable pulse
// starts T_DATA after the stage became able to fire and is T_PULSE wide; the
// stage becomes full and its predecessor empty T_STATE after the pulse; a
// stage never fires while full; a full FIFO stalls the source (back-pressure)
// and drains when the sink resumes.
module tb_asp_ctrl;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K       = 5;
  localparam int unsigned T_DATA  = 15;
  localparam int unsigned T_PULSE = 30;
  localparam int unsigned T_STATE = 16;
  localparam int unsigned NWORDS  = 200;

  logic           rst_n;
  logic [K:1]     en, done, s, ready, drain;
  logic [K:0][7:0] data;          // data[0] is the source register
  logic           src_full;       // source state (predecessor of c1)
  logic           sink_take;      // sink drains c5

  int unsigned checks = 0, failures = 0;
  int unsigned stalls = 0;

  for (genvar i = 1; i <= K; i++) begin : g_stage
    assign ready[i] = (i == 1) ? src_full : ~s[i-1];
    assign drain[i] = (i == K) ? sink_take : done[i+1];
    asp_ctrl #(.INIT_FULL(1'b0), .T_DATA(T_DATA), .T_PULSE(T_PULSE), .T_STATE(T_STATE))
      u_c (.rst_n(rst_n), .ready(ready[i]), .drain(drain[i]), .en(en[i]), .done(done[i]), .s(s[i]));
    always_latch if (en[i]) data[i] <= data[i-1];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Per-stage timing monitor.
  for (genvar i = 1; i <= K; i++) begin : g_mon
    time t_ready, t_rise;
    always @(posedge (ready[i] && s[i])) t_ready = $time;
    always @(posedge en[i]) begin
      t_rise = $time;
      check($time - t_ready == T_DATA, $sformatf("c%0d pulse start delay", i));
      check(s[i] == 1'b1, $sformatf("c%0d fires only when empty", i));
    end
    always @(negedge en[i]) if (rst_n) check($time - t_rise == T_PULSE, $sformatf("c%0d pulse width", i));
    always @(posedge done[i]) begin
      check($time - t_rise == T_PULSE + T_STATE, $sformatf("c%0d state change time", i));
      #0 check(s[i] == 1'b0, $sformatf("c%0d full after its event", i));
    end
  end

  // Source: present a word, mark full, wait until c1 has taken it.
  logic [7:0] sent [NWORDS];
  initial begin : source
    src_full = 0;
    data[0]  = 0;
    #30;
    for (int w = 0; w < NWORDS; w++) begin
      sent[w] = 8'($urandom);
      data[0] = sent[w];
      #3 src_full = 1;
      @(posedge done[1]);
      src_full = 0;
      #1;
      check(s[1] == 1'b0, "c1 full after taking source word");
    end
  end

  // Sink: take words from c5; pause for a while midway to back up the FIFO.
  int unsigned got = 0;
  initial begin : sink
    sink_take = 0;
    #30;
    while (got < NWORDS) begin
      wait (s[K] == 1'b0);
      #2;
      check(data[K] == sent[got], $sformatf("word %0d order/value", got));
      got++;
      if (got == 50) begin
        #2000;
        check(s == '0, "all stages full while sink stalls");
        if (s == '0) stalls++;
      end
      sink_take = 1; #1 sink_take = 0;
      #1 check(s[K] == 1'b1, "c5 empty after sink takes");
      #($urandom_range(0, 60));
    end
    #200;
    check(s == '1, "FIFO empty at end");
    check(stalls == 1, "back-pressure stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    #19 rst_n = 1;
    #20;
    check(s == '1, "all stages empty after reset");
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
