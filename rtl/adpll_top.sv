// adpll_top: all-digital PLL built around the low-power DCO.
//
// REF_CLK and the divided DCO clock meet in the PFD; its lead/lag levels
// drive the controller, whose code word goes to the DCO. The coarse bits
// [13:5] pass through the glitch cancellation flip-flops, each clocked by
// the falling edge of the ring tap of the stage it controls, so a path is
// never switched while an edge is inside it; the fine bits [4:0] only change
// loads and go straight in. The DCO output is divided by DIV_N (40) back to
// the reference rate: 12 MHz x 40 = 480 MHz.
//
// Frequency search (own choice of measurement, see adpll_controller): from
// the moment the controller raises `align` until the next rising REF_CLK
// edge, the ring and the divider are held, so the ring restarts on a reference rising edge and the PFD
// compares DIV_N DCO periods with one reference period. In phase tracking
// the ring runs freely and the code moves one LSB per reference period.
//
// Search word to DCO code (own choice; the document does not say how the
// controller drives the individual fields): the controller searches a
// 10-bit word {code[13:11], code[9:8], code[4:0]}. The three short-path
// selects [7:5] are held at SHORT_SEL, 3'b111 by default, the setting under
// which every stage is in the ring (the document characterises the 1st
// coarse stage with it); changing them while the ring runs would switch
// between sources of different latency, which the falling-edge retiming
// does not make safe. The 4-AND chain select code[10] is held at AND4_SEL
// (0): its step (413 ps) plus the smaller ones exceeds the level-2 cell step
// (529 ps), so with it in the searched word the period would not rise
// monotonically with the word and one-LSB tracking could walk the wrong way
// at a field boundary. Without it every searched bit outweighs, to within a
// few picoseconds, all the bits below it.
//
// Interface: ref_clk (12 MHz in the document), rst_n active low; outputs are
// the DCO clock, the feedback clock, the DCO code word, the PFD outputs and
// `locked` (search finished).
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned N         = DIV_N,
  parameter logic [2:0]  SHORT_SEL = 3'b111,
  parameter logic        AND4_SEL  = 1'b0
) (
  input  logic  ref_clk,
  input  logic  rst_n,
  output logic  dco_out,
  output logic  fb_clk,
  output code_t code,
  output logic  lead,
  output logic  lag,
  output logic  locked
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SW = CODE_W - 4;  // searched bits
  // Code word the glitch cancellation cells start from (controller reset).
  localparam code_t RESET_CODE = {3'b100, AND4_SEL, 2'b00, SHORT_SEL, 5'b00000};

  logic                       ctrl_clk;
  logic [SW-1:0]              search;
  logic                       align;
  logic                       dco_en;
  logic [NUM_TAPS-1:0]        y;
  logic [CODE_W-1:COARSE_LSB] code_c;

  assign ctrl_clk = ~ref_clk;
  assign code     = {search[SW-1:SW-3], AND4_SEL, search[SW-4:SW-5], SHORT_SEL,
                     search[COARSE_LSB-1:0]};
  // Ring enable. While align is high the ring is held until the next rising
  // reference edge; `released` remembers that edge so the enable does not
  // depend on the order in which ref_clk and align change at the falling
  // reference edge where align drops.
  logic released;

  always_ff @(posedge ref_clk or negedge rst_n or negedge align) begin
    if (!rst_n || !align) released <= 1'b0;
    else                  released <= 1'b1;
  end

  assign dco_en = rst_n & (~align | released);

  pfd u_pfd (
    .ref_clk (ref_clk),
    .fb_clk  (fb_clk),
    .rst_n   (rst_n),
    .clr     (align),
    .lead    (lead),
    .lag     (lag)
  );

  adpll_controller #(.W(SW)) u_ctrl (
    .clk    (ctrl_clk),
    .rst_n  (rst_n),
    .lead   (lead),
    .lag    (lag),
    .code   (search),
    .align  (align),
    .locked (locked)
  );

  glitch_cancel #(.RESET_VAL(RESET_CODE[CODE_W-1:COARSE_LSB])) u_gc (
    .rst_n    (rst_n),
    .y        (y),
    .code_in  (code[CODE_W-1:COARSE_LSB]),
    .code_out (code_c)
  );

  dco_model u_dco (
    .rst_n   (dco_en),
    .code_c  (code_c),
    .code_f  (code[COARSE_LSB-1:0]),
    .y       (y),
    .dco_out (dco_out)
  );

  freq_divider #(.N(N)) u_div (
    .clk    (dco_out),
    .rst_n  (dco_en),
    .fb_clk (fb_clk)
  );
endmodule
