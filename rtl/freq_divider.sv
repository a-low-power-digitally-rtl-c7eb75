// freq_divider: feedback divider of the ADPLL (divide by DIV_N, 40 by default,
// so a 480 MHz DCO clock gives a 12 MHz feedback clock).
//
// A modulo-N counter runs on the rising edge of the DCO clock. The feedback
// clock is registered: it rises on the N-th DCO rising edge after reset and
// every N edges after that, and stays high for N/2 edges (50 % duty cycle for
// even N). The asynchronous reset is the DCO enable: while the ring is held,
// the divider is held too, so after release the first feedback edge comes
// exactly N DCO periods after the ring starts. This is what lets the
// frequency search compare N DCO periods with one reference period.
//
// The division ratio is the document's; the counter structure, duty cycle and
// reset behaviour are this design's choices.
module freq_divider
  import adpll_pkg::*;
#(
  parameter int unsigned N = DIV_N
) (
  input  logic clk,     // DCO output
  input  logic rst_n,   // asynchronous, active low (DCO enable)
  output logic fb_clk
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = $clog2(N);

  logic [CW-1:0] cnt;

  initial begin
    assert (N >= 2) else $error("freq_divider: N must be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      fb_clk <= 1'b0;
    end else begin
      cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      if (cnt == CW'(N - 1))           fb_clk <= 1'b1;
      else if (cnt == CW'(N / 2 - 1))  fb_clk <= 1'b0;
    end
  end
endmodule
