// tb_dco_model: checks the behavioural DCO ring.
//  1. Period for a set of code words against values computed here from the
//     typical-corner period table (base period for the short-path pattern
//     plus the per-bit increments of the stages that are on the path).
//  2. Hold: with rst_n low the output settles high and stops toggling.
//  3. Glitches: a coarse select changed right after the rising edge at the
//     stage's output tap produces a runt pulse on that tap; the same change
//     made right after the falling edge of the tap (what the glitch
//     cancellation cells do) produces none.
module tb_dco_model;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic                       rst_n;
  logic [CODE_W-1:COARSE_LSB] code_c;
  logic [COARSE_LSB-1:0]      code_f;
  logic [NUM_TAPS-1:0]        y;
  logic                       dco_out;

  int checks = 0, failures = 0;

  dco_model dut (.rst_n, .code_c, .code_f, .y, .dco_out);

  // ---------------- reference model (period, ps) ----------------
  function automatic real ref_period(input code_t c);
    real p;
    logic [2:0] m;
    m = c[7:5];
    case (m)
      3'b000:  p = 1053.02;
      3'b001:  p = 1266.94;
      3'b011:  p = 1492.14;
      3'b111:  p = 1727.08;
      default: p = -1.0;
    endcase
    // fine loads, always on the path
    if (c[0]) p += 3.88;
    if (c[1]) p += 9.00;
    if (c[2]) p += 17.58;
    if (c[3]) p += 24.98;
    if (c[4]) p += 49.06;
    // 2nd coarse: Y0 stage always on the path
    if (c[8]) p += 111.02;
    if (m[0] && c[9])  p += 205.58;
    if (m[0] && c[10]) p += 412.72;
    if (m[1] && c[11]) p += 528.92;
    if (m[1] && c[12]) p += 1057.32;
    if (m[2] && c[13]) p += 2082.72;
    return p;
  endfunction

  // ---------------- measurement ----------------
  realtime last_rise = 0, period = 0;
  realtime last_edge = 0;
  logic [NUM_TAPS-1:0] y_prev = '1;
  realtime min_pulse = 1.0e9;
  int      edges = 0;

  always @(posedge dco_out) begin
    period    = $realtime - last_rise;
    last_rise = $realtime;
  end

  always @(dco_out) edges++;

  // narrowest pulse on the tap under test
  int      watch_tap = 0;
  always @(y) begin
    if (y[watch_tap] != y_prev[watch_tap]) begin
      if (rst_n && ($realtime - last_edge) < min_pulse) min_pulse = $realtime - last_edge;
      last_edge = $realtime;
    end
    y_prev = y;
  end

  task automatic apply(input code_t c);
    code_c = c[CODE_W-1:COARSE_LSB];
    code_f = c[COARSE_LSB-1:0];
  endtask

  task automatic check_period(input code_t c);
    real exp_p;
    rst_n = 1'b0;
    apply(c);
    #20000;
    rst_n = 1'b1;
    repeat (5) @(posedge dco_out);
    exp_p = ref_period(c);
    checks++;
    if (period < exp_p - 0.5 || period > exp_p + 0.5) begin
      failures++;
      $display("FAIL code=%b period=%0.2f expected=%0.2f", c, period, exp_p);
    end
  endtask

  // Change code bit `bit_i` (selects of the stage with output tap `tap`)
  // right after an edge of that tap; return the narrowest output pulse seen.
  task automatic glitch_try(input code_t c0, input int bit_i, input int tap,
                            input bit at_rise, output realtime narrowest);
    code_t c1;
    rst_n = 1'b0;
    apply(c0);
    #20000;
    rst_n = 1'b1;
    repeat (4) @(posedge dco_out);
    if (at_rise) @(posedge y[tap]); else @(negedge y[tap]);
    #1;
    watch_tap = tap;
    last_edge = $realtime;
    c1 = c0;
    c1[bit_i] = ~c1[bit_i];
    min_pulse = 1.0e9;
    apply(c1);
    repeat (4) @(posedge dco_out);
    narrowest = min_pulse;
  endtask

  initial begin
    realtime w_rise, w_fall;
    code_t   base;
    int      e0;
    rst_n  = 1'b0;
    code_c = '0;
    code_f = '0;

    // 1. periods
    check_period(14'b000_000_000_00_000);
    check_period(14'b000_000_000_00_001);
    check_period(14'b000_000_000_00_111);
    check_period(14'b000_000_000_01_000);
    check_period(14'b000_000_000_11_000);
    check_period(14'b000_001_000_00_000);
    check_period(14'b000_000_001_00_000);
    check_period(14'b000_000_011_00_000);
    check_period(14'b000_000_111_00_000);
    check_period(14'b000_111_111_00_000);
    check_period(14'b001_000_111_00_000);
    check_period(14'b010_000_111_00_000);
    check_period(14'b100_000_111_00_000);
    check_period(14'b111_111_111_11_111);
    check_period(14'b111_111_011_10_101);
    check_period(14'b010_101_111_01_010);

    // 2. hold
    rst_n = 1'b0;
    #20000;
    e0 = edges;
    #20000;
    checks++;
    if (edges != e0 || dco_out !== 1'b1) begin
      failures++;
      $display("FAIL hold: edges=%0d->%0d out=%b", e0, edges, dco_out);
    end

    // 3. glitches on the LV2 stage select (bit 11, tap Y3) and on the
    //    4-AND select (bit 10, tap Y2): short path -> long path
    base = 14'b000_000_111_00_000;
    glitch_try(base, 11, 3, 1'b1, w_rise);
    glitch_try(base, 11, 3, 1'b0, w_fall);
    checks++;
    if (!(w_rise < 300.0)) begin
      failures++;
      $display("FAIL no runt pulse when switching at the rising edge (min %0.1f ps)", w_rise);
    end
    checks++;
    if (w_fall < 800.0) begin
      failures++;
      $display("FAIL runt pulse when switching at the falling edge (min %0.1f ps)", w_fall);
    end
    glitch_try(base, 10, 2, 1'b1, w_rise);
    glitch_try(base, 10, 2, 1'b0, w_fall);
    checks++;
    if (!(w_rise < 300.0)) begin
      failures++;
      $display("FAIL no runt pulse on bit 10 at the rising edge (min %0.1f ps)", w_rise);
    end
    checks++;
    if (w_fall < 800.0) begin
      failures++;
      $display("FAIL runt pulse on bit 10 at the falling edge (min %0.1f ps)", w_fall);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
