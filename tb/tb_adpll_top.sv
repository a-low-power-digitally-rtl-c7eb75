// tb_adpll_top: end-to-end run of the ADPLL at its default parameters
// (divide by 40, 14-bit code) with a 12 MHz reference: the target is
// 480 MHz, a DCO period of 2083.33 ps.
//
// Checks:
//  * the frequency search finishes (locked) within 42 reference periods;
//  * after locking, the mean DCO period over the tracking window is within
//    0.5 % of REF/40, and the feedback clock keeps the reference rate;
//  * the searched word stays within 32 LSB of the value the search found;
//  * no runt pulse ever appears on the DCO output (narrowest high or low
//    phase at least 40 % of the target period) while the ring runs freely.
// Reported without a check: the spread of single DCO periods while tracking
// (peak-to-peak period jitter; the model has no noise, so this is the
// dithering of the code and the one-cycle transients when a coarse bit and
// the fine bits reach the ring in different cycles).
// Mechanisms that must each happen at least once: ring held and restarted
// for a search measurement, search step up, search step down, tracking step
// up, tracking step down, a coarse code bit retimed by the glitch
// cancellation flip-flops while the ring runs.
module tb_adpll_top;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T_REF    = 83333.333;     // 12 MHz
  localparam real     T_TARGET = 83333.333 / 40.0;
  localparam int      TRACK_CYCLES = 150;

  logic  ref_clk = 1'b0;
  logic  rst_n;
  logic  dco_out, fb_clk, lead, lag, locked;
  code_t code;

  int checks = 0, failures = 0;

  adpll_top dut (.ref_clk, .rst_n, .dco_out, .fb_clk, .code, .lead, .lag, .locked);

  always #(T_REF / 2.0) ref_clk = ~ref_clk;

  // ---------------- mechanism counters ----------------
  int n_hold = 0, n_search_up = 0, n_search_dn = 0, n_track_up = 0, n_track_dn = 0;
  int n_retime = 0;
  code_t prev_code;
  logic  prev_locked;
  logic  [CODE_W-1:COARSE_LSB] prev_code_c;

  always @(negedge dut.dco_en) if (rst_n) n_hold++;

  always @(posedge ref_clk or negedge ref_clk) begin : count_steps
    if (rst_n) begin
      if (code > prev_code) begin
        if (prev_locked) n_track_up++; else n_search_up++;
      end else if (code < prev_code) begin
        if (prev_locked) n_track_dn++; else n_search_dn++;
      end
    end
    prev_code   = code;
    prev_locked = locked;
  end

  always @(dut.code_c) begin
    if (rst_n && dut.dco_en && dut.code_c != prev_code_c) n_retime++;
    prev_code_c = dut.code_c;
  end

  // ---------------- DCO output pulse widths ----------------
  realtime last_edge = 0, min_phase = 1.0e9;
  int      dco_rises = 0;
  logic    measure = 1'b0;
  // period spread (peak-to-peak period jitter) while tracking
  realtime last_rise = 0, min_per = 1.0e9, max_per = 0;
  always @(dco_out) begin
    if (measure && dut.dco_en && ($realtime - last_edge) < min_phase)
      min_phase = $realtime - last_edge;
    last_edge = $realtime;
    if (dco_out && measure) begin
      if (dco_rises > 0) begin
        if ($realtime - last_rise < min_per) min_per = $realtime - last_rise;
        if ($realtime - last_rise > max_per) max_per = $realtime - last_rise;
      end
      last_rise = $realtime;
      dco_rises++;
    end
  end

  int fb_rises = 0;
  always @(posedge fb_clk) if (measure) fb_rises++;

  initial begin
    int      lock_cycle;
    realtime t0, t1;
    real     mean_p;
    int      code_at_lock;
    int      max_dev;

    rst_n       = 1'b1;
    #1 rst_n    = 1'b0;  // a falling edge, so the asynchronous resets act
    prev_code   = '0;
    prev_locked = 1'b0;
    prev_code_c = '0;
    repeat (3) @(posedge ref_clk);
    #1000 rst_n = 1'b1;

    lock_cycle = 0;
    while (!locked && lock_cycle < 60) begin
      @(posedge ref_clk);
      lock_cycle++;
    end
    checks++;
    if (!locked || lock_cycle > 42) begin
      failures++;
      $display("FAIL search not finished within 42 reference periods (%0d)", lock_cycle);
    end
    code_at_lock = int'(dut.search);
    $display("search done after %0d reference periods, code=%b", lock_cycle, code);

    // let tracking settle, then measure
    repeat (20) @(posedge ref_clk);
    measure   = 1'b1;
    last_edge = $realtime;
    @(posedge dco_out);
    t0 = $realtime;
    dco_rises = 0;
    fb_rises  = 0;
    max_dev   = 0;
    for (int i = 0; i < TRACK_CYCLES; i++) begin
      @(posedge ref_clk);
      if (int'(dut.search) - code_at_lock > max_dev) max_dev = int'(dut.search) - code_at_lock;
      if (code_at_lock - int'(dut.search) > max_dev) max_dev = code_at_lock - int'(dut.search);
    end
    @(posedge dco_out);
    t1 = $realtime;
    mean_p = (t1 - t0) / real'(dco_rises);
    $display("mean DCO period %0.2f ps (target %0.2f), %0d DCO / %0d FB edges, code=%b max dev=%0d",
             mean_p, T_TARGET, dco_rises, fb_rises, code, max_dev);

    checks++;
    if (mean_p < T_TARGET * 0.995 || mean_p > T_TARGET * 1.005) begin
      failures++;
      $display("FAIL mean period %0.2f ps", mean_p);
    end
    checks++;
    if (fb_rises < TRACK_CYCLES - 2 || fb_rises > TRACK_CYCLES + 2) begin
      failures++;
      $display("FAIL feedback edges %0d for %0d reference periods", fb_rises, TRACK_CYCLES);
    end
    checks++;
    if (max_dev > 32) begin
      failures++;
      $display("FAIL search word wandered %0d LSB during tracking", max_dev);
    end
    $display("DCO period spread while tracking: %0.2f .. %0.2f ps (%0.2f ps peak to peak)",
             min_per, max_per, max_per - min_per);
    checks++;
    if (min_phase < 0.4 * T_TARGET) begin
      failures++;
      $display("FAIL runt pulse on the DCO output: %0.1f ps", min_phase);
    end

    $display("mechanisms: hold=%0d search_up=%0d search_dn=%0d track_up=%0d track_dn=%0d retime=%0d",
             n_hold, n_search_up, n_search_dn, n_track_up, n_track_dn, n_retime);
    checks++; if (n_hold      == 0) begin failures++; $display("FAIL ring never held for a measurement"); end
    checks++; if (n_search_up == 0) begin failures++; $display("FAIL no search step up"); end
    checks++; if (n_search_dn == 0) begin failures++; $display("FAIL no search step down"); end
    checks++; if (n_track_up  == 0) begin failures++; $display("FAIL no tracking step up"); end
    checks++; if (n_track_dn  == 0) begin failures++; $display("FAIL no tracking step down"); end
    checks++; if (n_retime    == 0) begin failures++; $display("FAIL no retimed coarse change"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_REF * 400);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
