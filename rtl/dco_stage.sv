// dco_stage: behavioural model of one path-selection stage of the DCO ring
// (not synthesizable; used only inside dco_model).
//
// The stage input is the previous stage's output, or, when the stage has a
// short-path select (HAS_SHORT) and sel_m is 0, the short-path line that
// comes straight from the ring's NAND gate. A gating AND passes that input
// into the stage's delay cell only when sel_l is 1 (so an unused cell_q does
// not toggle), and the output multiplexer forwards either the delay cell or
// the un-delayed input. Delays are in picoseconds and behave like gate
// delays (a pulse shorter than a delay is absorbed there). Changing sel_l
// while the stage input is high and the delay cell output is still low
// produces a runt pulse at the stage output: the glitch the glitch
// cancellation flip-flops are there to prevent.
//
// Delays are half-period contributions (a ring period is twice the loop
// delay). Structure follows the DCO block diagram; the delay values come
// from dco_model.
module dco_stage #(
  parameter bit  HAS_SHORT = 1'b0,
  parameter real T_CELL    = 100.0,  // delay cell, ps
  parameter real T_MUX     = 50.0    // output multiplexer, ps
) (
  input  logic prev,     // previous stage output
  input  logic short_in, // short-path line (ignored unless HAS_SHORT)
  input  logic sel_l,    // 1: go through the delay cell
  input  logic sel_m,    // 1: take prev, 0: take short_in (HAS_SHORT only)
  output logic y
);
  timeunit 1ps;
  timeprecision 1fs;

  logic src, gated, cell_q, mux_in;

  assign src   = (HAS_SHORT && !sel_m) ? short_in : prev;
  assign gated = src & sel_l;

  // delay cell
  // (evaluated once at start-up, then on every input change)
  always begin
    cell_q <= #(T_CELL) gated;
    @(gated);
  end

  assign mux_in = sel_l ? cell_q : src;

  // output multiplexer
  always begin
    y <= #(T_MUX) mux_in;
    @(mux_in);
  end

endmodule
