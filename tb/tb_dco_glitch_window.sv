// tb_dco_glitch_window: sweeps the moment of a coarse-code change across a
// whole oscillator cycle and checks where the DCO model produces a glitch.
//
// The stage under test is the level-2 hysteresis stage (select code[11],
// output tap Y3, output multiplexer delay T_M = 56.30 ps), with every
// short-path select set. The switch time d is measured from a rising edge
// at the tap; T is the cycle period before the change.
//   short -> long (code[11] 0 -> 1): a glitch is expected for
//       0 < d < T/2 - T_M   or   T - T_M < d < T,
//     i.e. while the stage input is high, and none in between, which is the
//     window right after the falling edge that the glitch cancellation
//     flip-flops use.
//   long -> short (code[11] 1 -> 0): no glitch at any d.
// A glitch is any pulse on the tap more than 20 ps shorter than the shorter
// of the half periods before and after the change: either a runt (the multiplexer drops to the not
// yet charged long path and rises again) or a high phase cut short (the
// long path never catches up before the input falls). A clean change gives
// only pulses of the old or the new length, or between them. Points within 40 ps of a window edge are skipped, since
// the exact edge depends on how the delays are split.
module tb_dco_glitch_window;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  TAP     = 3;
  localparam int  BIT_SEL = 11;
  localparam real T_M     = 56.30;
  localparam real SHORTER = 20.0;
  localparam real MARGIN  = 40.0;
  localparam int  POINTS  = 48;

  logic                       rst_n;
  logic [CODE_W-1:COARSE_LSB] code_c;
  logic [COARSE_LSB-1:0]      code_f;
  logic [NUM_TAPS-1:0]        y;
  logic                       dco_out;

  int checks = 0, failures = 0;
  int glitches_seen = 0, clean_seen = 0;

  dco_model dut (.rst_n, .code_c, .code_f, .y, .dco_out);

  // narrowest pulse on the tap while `watching` is set
  bit      watching = 1'b0;
  realtime last_edge = 0, min_pulse = 1.0e9;

  always @(y[TAP]) begin
    // (the edge that arms the monitor is seen at the same instant: skip it)
    if (watching && $realtime > last_edge && ($realtime - last_edge) < min_pulse)
      min_pulse = $realtime - last_edge;
    last_edge = $realtime;
  end

  localparam code_t BASE = code_t'(14'b000_000_111_00000);

  // Returns the narrowest pulse seen on the tap after switching code[11]
  // from `from_v` to ~from_v at d ps after a rising edge of the tap.
  task automatic try_switch(input bit from_v, input real frac, output real d,
                            output real t_cyc, output real t_half, output realtime narrowest);
    code_t   c;
    realtime r0;
    c = BASE;
    c[BIT_SEL] = from_v;
    rst_n  = 1'b0;
    code_c = c[CODE_W-1:COARSE_LSB];
    code_f = c[COARSE_LSB-1:0];
    #20000;
    rst_n = 1'b1;
    repeat (4) @(posedge y[TAP]);
    r0 = $realtime;
    @(posedge y[TAP]);
    t_cyc = $realtime - r0;
    d = frac * t_cyc;
    last_edge = $realtime;
    min_pulse = 1.0e9;
    watching  = 1'b1;
    #(d);
    code_c[BIT_SEL] = ~from_v;
    repeat (3) @(posedge y[TAP]);
    r0 = $realtime;
    @(posedge y[TAP]);
    watching  = 1'b0;
    narrowest = min_pulse;
    // shorter half period of the two codes
    t_half = (($realtime - r0) < t_cyc ? ($realtime - r0) : t_cyc) / 2.0;
  endtask

  initial begin
    real     d, t_cyc, t_half, lo_edge, hi_edge;
    realtime w;
    bit      expect_glitch, got_glitch;
    rst_n  = 1'b1;
    code_c = BASE[CODE_W-1:COARSE_LSB];
    code_f = '0;
    #1 rst_n = 1'b0;

    // short -> long
    for (int k = 0; k < POINTS; k++) begin
      try_switch(1'b0, (real'(k) + 0.5) / real'(POINTS), d, t_cyc, t_half, w);
      lo_edge = t_cyc / 2.0 - T_M;
      hi_edge = t_cyc - T_M;
      if ((d > lo_edge - MARGIN && d < lo_edge + MARGIN) ||
          (d > hi_edge - MARGIN && d < hi_edge + MARGIN)) continue;
      expect_glitch = (d < lo_edge) || (d > hi_edge);
      got_glitch    = (w < t_half - SHORTER);
      if (got_glitch) glitches_seen++; else clean_seen++;
      checks++;
      if (got_glitch != expect_glitch) begin
        failures++;
        $display("FAIL short->long d=%0.1f of T=%0.1f: narrowest %0.1f ps, glitch expected %0d",
                 d, t_cyc, w, expect_glitch);
      end
    end

    // long -> short
    for (int k = 0; k < POINTS; k++) begin
      try_switch(1'b1, (real'(k) + 0.5) / real'(POINTS), d, t_cyc, t_half, w);
      checks++;
      if (w < t_half - SHORTER) begin
        failures++;
        $display("FAIL long->short d=%0.1f of T=%0.1f: narrowest %0.1f ps", d, t_cyc, w);
      end
    end

    // both outcomes of the short -> long sweep must have occurred
    checks++;
    if (glitches_seen == 0 || clean_seen == 0) begin
      failures++;
      $display("FAIL sweep saw %0d glitches and %0d clean switches", glitches_seen, clean_seen);
    end
    $display("short->long: %0d switch times glitched, %0d were clean", glitches_seen, clean_seen);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
