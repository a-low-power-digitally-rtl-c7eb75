// tb_pfd: feeds the detector two 12 MHz clocks with a set of phase offsets,
// including the +-30 ps sweep ends of the document's detector simulation,
// and checks the lead/lag levels after every reference edge:
//   feedback leads  -> lag = 1, lead = 0
//   feedback lags   -> lead = 1, lag = 0
//   same instant    -> both 1 (no decision)
// Also checks that clr empties the detector and forces both outputs low,
// and that a missing feedback edge reads as "feedback lags".
module tb_pfd;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime T = 83333.0;

  logic ref_clk = 1'b0, fb_clk = 1'b0;
  logic rst_n, clr;
  logic lead, lag;
  int   checks = 0, failures = 0;

  pfd dut (.ref_clk, .fb_clk, .rst_n, .clr, .lead, .lag);

  // one pair of rising edges; offset > 0: feedback earlier by `offset`
  task automatic pair(input realtime offset);
    if (offset >= 0) begin
      #(T / 2.0 - offset);
      fb_clk = 1'b1;
      #(offset);
      ref_clk = 1'b1;
    end else begin
      #(T / 2.0);
      ref_clk = 1'b1;
      #(-offset);
      fb_clk = 1'b1;
    end
    #(T / 4.0);
    ref_clk = 1'b0;
    fb_clk  = 1'b0;
    #(T / 4.0 - (offset >= 0 ? 0.0 : -offset));
  endtask

  task automatic expect_out(input logic e_lead, input logic e_lag, input string what);
    checks++;
    if (lead !== e_lead || lag !== e_lag) begin
      failures++;
      $display("FAIL %s: lead=%b lag=%b, expected %b %b", what, lead, lag, e_lead, e_lag);
    end
  endtask

  initial begin
    realtime offs [6] = '{30.0, -30.0, 5000.0, -5000.0, 10.0, -10.0};
    rst_n = 1'b1;
    clr   = 1'b0;
    #1 rst_n = 1'b0;
    #100;
    expect_out(1'b0, 1'b0, "reset");
    rst_n = 1'b1;

    foreach (offs[i]) begin
      repeat (3) begin
        pair(offs[i]);
        if (offs[i] > 0) expect_out(1'b0, 1'b1, $sformatf("fb leads by %0.0f ps", offs[i]));
        else             expect_out(1'b1, 1'b0, $sformatf("fb lags by %0.0f ps", -offs[i]));
      end
    end

    // simultaneous edges
    pair(0.0);
    pair(0.0);
    expect_out(1'b1, 1'b1, "simultaneous edges");

    // clr
    pair(-2000.0);
    clr = 1'b1;
    #10;
    expect_out(1'b0, 1'b0, "clr");
    pair(0.0);
    expect_out(1'b0, 1'b0, "edges during clr");
    clr = 1'b0;

    // reference edge alone: feedback lags
    #(T / 2.0);
    ref_clk = 1'b1;
    #(T / 2.0);
    ref_clk = 1'b0;
    expect_out(1'b1, 1'b0, "missing feedback edge");
    // the late feedback edge is paired with that reference edge
    #1000 fb_clk = 1'b1;
    #1000 fb_clk = 1'b0;
    expect_out(1'b1, 1'b0, "late feedback edge");
    // next pair with feedback leading is decided afresh
    pair(300.0);
    expect_out(1'b0, 1'b1, "after late edge");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 100);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
