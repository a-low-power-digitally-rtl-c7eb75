// tb_adpll_controller: closes the controller's loop with an ideal detector
// kept here: lead when the code is above a target (DCO too slow), lag when
// below, both when equal. Checks, for the default 14-bit word and for the
// 10-bit word the ADPLL top uses:
//  * align is high in the reset/alignment states and alternates with the
//    compare state during the search;
//  * every search step matches an independent binary-search model (start at
//    2^(W-1), first step 2^(W-2), halving down to 1);
//  * locked rises after exactly 1 + 2*(W-1) clocks and the code is then
//    within one LSB of the target;
//  * in tracking the code moves one LSB per clock towards a moved target
//    and holds when lead and lag are both high;
//  * saturation at 0 and at 2^W-1.
module tb_adpll_controller;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;

  always #500 clk = ~clk;

  // ---- default width (14) ----
  logic [13:0] code14;
  logic        align14, locked14, lead14, lag14;
  int          target14;
  adpll_controller dut14 (.clk, .rst_n, .lead(lead14), .lag(lag14),
                          .code(code14), .align(align14), .locked(locked14));
  assign lead14 = int'(code14) >= target14;
  assign lag14  = int'(code14) <= target14;

  // ---- 10-bit ----
  logic [9:0] code10;
  logic       align10, locked10, lead10, lag10;
  int         target10;
  adpll_controller #(.W(10)) dut10 (.clk, .rst_n, .lead(lead10), .lag(lag10),
                                    .code(code10), .align(align10), .locked(locked10));
  assign lead10 = int'(code10) >= target10;
  assign lag10  = int'(code10) <= target10;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Run a search on both instances, compare with the model each clock.
  task automatic run_search(input int t14, input int t10);
    int m14, s14, m10, s10, cyc;
    target14 = t14;
    target10 = t10;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    @(negedge clk);
    check(code14 == 14'h2000 && align14 && !locked14, "14-bit reset state");
    check(code10 == 10'h200  && align10 && !locked10, "10-bit reset state");
    rst_n = 1'b1;
    m14 = 1 << 13; s14 = 1 << 12;
    m10 = 1 << 9;  s10 = 1 << 8;
    cyc = 0;
    lock10_cycle = -1;
    // clock 1: S_INIT -> S_ALIGN, clock 2: S_ALIGN -> S_WAIT
    @(posedge clk); #1; cyc++;
    check(align14 && align10, "align held after first clock");
    while (cyc < 40) begin
      @(posedge clk); #1; cyc++;
      if (locked10 && lock10_cycle < 0) lock10_cycle = cyc;
      if (!align14 && !locked14) begin
        // now in S_WAIT: next clock decides
        @(posedge clk); #1; cyc++;
        if (locked10 && lock10_cycle < 0) lock10_cycle = cyc;
        if (s14 > 0) begin
          if (m14 > t14) m14 -= s14; else if (m14 < t14) m14 += s14;
          check(int'(code14) == m14, $sformatf("14-bit search step: code %0d model %0d", code14, m14));
          s14 = s14 / 2;
          if (s14 == 0)
            check(locked14 && cyc == 1 + 2 * 13, $sformatf("14-bit locked at clock %0d", cyc));
          else
            check(align14 && !locked14, "14-bit align after a measurement");
        end
      end
      if (locked14 && locked10) break;
    end
    // the 10-bit instance finished earlier
    check(locked10, "10-bit locked");
    check(locked14, "14-bit locked");
    check(lock10_cycle == 1 + 2 * 9, $sformatf("10-bit locked at clock %0d", lock10_cycle));
    if (t14 >= 0 && t14 < (1 << 14))
      check(int'(code14) - t14 <= 1 && t14 - int'(code14) <= 1,
            $sformatf("14-bit final code %0d target %0d", code14, t14));
    if (t10 >= 0 && t10 < (1 << 10))
      check(int'(code10) - t10 <= 1 && t10 - int'(code10) <= 1,
            $sformatf("10-bit final code %0d target %0d", code10, t10));
  endtask

  int lock10_cycle = -1;

  initial begin
    int c0;
    rst_n = 1'b1;
    target14 = 0;
    target10 = 0;

    run_search(5000, 700);
    run_search(12345, 77);
    run_search(0, 0);           // bottom of the range
    // above the range: search ends at the top, tracking saturates there
    run_search(20000, 5000);
    repeat (4) @(posedge clk);
    #1;
    check(code14 == 14'h3fff && code10 == 10'h3ff, "saturation at 2^W-1");
    run_search(5000, 700);

    // tracking: move the targets, expect one LSB per clock
    c0 = int'(code14);
    target14 = c0 + 100;
    repeat (5) @(posedge clk);
    #1;
    check(int'(code14) == c0 + 5, $sformatf("tracking +1 per clock (%0d -> %0d)", c0, code14));
    c0 = int'(code14);
    target14 = c0 - 100;
    repeat (3) @(posedge clk);
    #1;
    check(int'(code14) == c0 - 3, "tracking -1 per clock");
    target14 = int'(code14);      // lead and lag both high
    repeat (3) @(posedge clk);
    #1;
    check(int'(code14) == target14, "hold when both lead and lag");
    check(!align14 && locked14, "tracking keeps align low and locked high");

    // below the range: search ends at 1, tracking saturates at 0
    run_search(-5, -5);
    repeat (4) @(posedge clk);
    #1;
    check(code14 == 14'd0 && code10 == 10'd0, "saturation at 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
