// glitch_cancel: the synchronization cells between the controller and the
// coarse multiplexers of the DCO.
//
// A path multiplexer in the ring produces a runt pulse when its select
// changes while the signal at its input is high and the newly chosen path
// has not caught up. After the falling edge has passed a stage, every path
// into that stage's multiplexer is low for the next half period, so a select
// change there is harmless. Each coarse code bit is therefore captured by a
// D flip-flop clocked on the falling edge of the output tap of the stage it
// controls (Y5..Y0), following the bit-to-tap assignment of the block
// diagram (13->Y5, 12/7->Y4, 11->Y3, 10/6->Y2, 9->Y1, 8/5->Y0).
//
// Interface: code_in[13:5] are the controller's coarse bits, y[5:0]
// are the ring taps, code_out[13:5] feeds the multiplexers.
// Timing: a new bit reaches its multiplexer at the first falling edge of its
// tap after the change, i.e. within one DCO period.
// Design choices: capture on the falling edge (the document states glitches
// do not occur at the falling edge; the clock polarity of the flip-flops is
// not printed); asynchronous active-low reset to RESET_VAL, which should be
// the controller's reset code so that the first edges after reset do not
// switch a path.
module glitch_cancel
  import adpll_pkg::*;
#(
  parameter int unsigned          LSB       = COARSE_LSB,
  parameter logic [CODE_W-1:LSB] RESET_VAL = '0
) (
  input  logic              rst_n,
  input  logic [NUM_TAPS-1:0] y,
  input  logic [CODE_W-1:LSB] code_in,
  output logic [CODE_W-1:LSB] code_out
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar b = LSB; b < CODE_W; b++) begin : g_sync
    localparam int unsigned TAP = TAP_OF_BIT[b];
    logic q;
    always_ff @(negedge y[TAP] or negedge rst_n) begin
      if (!rst_n) q <= RESET_VAL[b];
      else        q <= code_in[b];
    end
    assign code_out[b] = q;
  end
endmodule
