// adpll_controller: turns the PFD lead/lag decisions into the DCO code word.
//
// Two modes, as in the document:
//  * Frequency search (binary search). The code starts at the middle of the
//    range (2^(W-1)) with a step of a quarter of the range (2^(W-2)). Each
//    measurement adds the step when the DCO is too fast (lag) or subtracts
//    it when the DCO is too slow (lead); the step then halves. The search
//    ends after the measurement made with a step of one: W-1 measurements.
//  * Phase tracking. Once per reference period the code moves by one LSB
//    towards the reference phase (lead: -1, lag: +1, neither or both: hold).
//
// Measurement (own choice, the document gives only the search rule): the
// controller runs on the falling edge of the reference (clk = ~REF_CLK).
// In S_ALIGN it raises `align` for one reference period; align holds the
// DCO ring and the divider while REF_CLK is low and empties the PFD, so the
// ring starts exactly on the next rising reference edge and the first
// feedback edge arrives DIV_N DCO periods later. The PFD then compares it
// with the following reference edge, and in S_WAIT the controller reads the
// result half a reference period later. One measurement takes two reference
// periods, so the search ends 2*(W-1)+2 reference periods after reset
// (28 for W = 14), inside the 42 cycles the document reports for locking.
//
// Interface: code is registered and changes on clk; locked is high in phase
// tracking. The code saturates at 0 and 2^W-1.
module adpll_controller
  import adpll_pkg::*;
#(
  parameter int unsigned W = CODE_W
) (
  input  logic         clk,     // inverted reference clock
  input  logic         rst_n,   // asynchronous, active low
  input  logic         lead,    // feedback lags: DCO too slow
  input  logic         lag,     // feedback leads: DCO too fast
  output logic [W-1:0] code,
  output logic         align,
  output logic         locked
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [W-1:0] CODE_MID   = W'(1) << (W - 1);
  localparam logic [W-1:0] STEP_START = W'(1) << (W - 2);
  localparam logic [W:0]   CODE_MAX   = (W + 1)'((1 << W) - 1);

  ctrl_state_t  state;
  logic [W-1:0] step;
  logic         up, down;
  logic [W:0]   sum_up;
  logic [W-1:0] delta;

  initial begin
    assert (W >= 3) else $error("adpll_controller: W must be at least 3");
  end

  assign up    = lag & ~lead;
  assign down  = lead & ~lag;
  assign delta = (state == S_TRACK) ? W'(1) : step;
  assign sum_up = {1'b0, code} + {1'b0, delta};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_INIT;
      code   <= CODE_MID;
      step   <= STEP_START;
      align  <= 1'b1;
      locked <= 1'b0;
    end else begin
      unique case (state)
        S_INIT: begin
          state <= S_ALIGN;
          align <= 1'b1;
        end
        S_ALIGN: begin
          state <= S_WAIT;
          align <= 1'b0;
        end
        S_WAIT: begin
          if (up)        code <= (sum_up > CODE_MAX) ? CODE_MAX[W-1:0] : sum_up[W-1:0];
          else if (down) code <= (code < delta) ? '0 : code - delta;
          if (step == W'(1)) begin
            state  <= S_TRACK;
            align  <= 1'b0;
            locked <= 1'b1;
          end else begin
            step  <= step >> 1;
            state <= S_ALIGN;
            align <= 1'b1;
          end
        end
        S_TRACK: begin
          if (up)        code <= (sum_up > CODE_MAX) ? CODE_MAX[W-1:0] : sum_up[W-1:0];
          else if (down) code <= (code < delta) ? '0 : code - delta;
        end
        default: state <= S_INIT;
      endcase
    end
  end
endmodule
