// pfd: modified three-state phase/frequency detector with lead/lag outputs.
//
// Two "seen" flip-flops record which clock edge of a REF/FB pair has
// arrived; when both have, they clear each other (the classic three-state
// detector). Two output flip-flops turn the arrival order into levels:
//   lead is clocked by ref_clk and captures "FB edge not yet seen": it is 1
//        when the feedback clock lags the reference (DCO too slow);
//   lag  is clocked by fb_clk and captures "REF edge not yet seen": it is 1
//        when the feedback clock leads the reference (DCO too fast).
// Edges closer than one simulation step set both, which the controller reads
// as "no decision". clr (asynchronous, active high) empties the detector and
// forces both outputs low; the controller raises it around the reference
// edge that starts a frequency-search measurement.
//
// Follows the document: two edge flip-flops with a shared reset, lead
// flip-flop clocked by REF_CLK, lag flip-flop clocked by FB_CLK, RST input,
// and the lead/lag polarity of the detector simulation (feedback leading:
// lag high, lead low). Own choices: the cross-coupled latch and the digital
// pulse amplifiers of the schematic are replaced by sampling the other
// side's seen flag (same decision, without the analog pulse shaping), and
// the clr input.
module pfd (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  input  logic clr,
  output logic lead = 1'b0,
  output logic lag  = 1'b0
);
  timeunit 1ps;
  timeprecision 1fs;

  // Declaration initialisers give the flip-flops a defined power-up state, so
  // the first reset pulse is always seen as an edge.
  logic ref_seen = 1'b0;
  logic fb_seen  = 1'b0;
  logic out_rst, seen_rst;

  assign out_rst  = clr | ~rst_n;
  assign seen_rst = out_rst | (ref_seen & fb_seen);

  always_ff @(posedge ref_clk or posedge seen_rst) begin
    if (seen_rst) ref_seen <= 1'b0;
    else          ref_seen <= 1'b1;
  end

  always_ff @(posedge fb_clk or posedge seen_rst) begin
    if (seen_rst) fb_seen <= 1'b0;
    else          fb_seen <= 1'b1;
  end

  always_ff @(posedge ref_clk or posedge out_rst) begin
    if (out_rst) lead <= 1'b0;
    else         lead <= ~fb_seen;
  end

  always_ff @(posedge fb_clk or posedge out_rst) begin
    if (out_rst) lag <= 1'b0;
    else         lag <= ~ref_seen;
  end
endmodule
