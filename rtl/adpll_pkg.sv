// adpll_pkg: constants and types shared by the ADPLL blocks.
//
// The DCO is steered by one 14-bit code word. Its fields, from the top bit
// down, follow the cascade of tuning stages of the oscillator:
//   [13:11] 1st coarse stage: hysteresis delay cells of level 4, 3 and 2
//   [10:8]  2nd coarse stage: binary-weighted AND-gate delay chains (4, 2, 1)
//   [7:5]   short-path selects of the three 4-input multiplexers
//   [4:3]   1st fine stage: resistor/gate-capacitor loads
//   [2:0]   2nd fine stage: MOS gate-capacitor loads
// Bits [13:5] reach the ring through the glitch cancellation flip-flops;
// bits [4:0] only change loads and are applied directly.
// The field layout is taken from the ADPLL block diagram; the numbers
// (14-bit word, divide-by-40, 12 MHz reference) are the design's own.
package adpll_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CODE_W     = 14;  // DCO control word width
  localparam int unsigned COARSE_LSB = 5;   // lowest retimed (coarse) bit
  localparam int unsigned NUM_TAPS   = 6;   // ring taps Y5..Y0
  localparam int unsigned DIV_N      = 40;  // feedback division ratio

  typedef logic [CODE_W-1:0] code_t;

  // Ring tap whose falling edge retimes each coarse code bit (index = bit).
  // Bits below COARSE_LSB are not retimed; their entries are unused.
  localparam int unsigned TAP_OF_BIT [CODE_W] = '{
    0, 0, 0, 0, 0,   // bits 0..4  (fine, not retimed)
    0,               // bit 5  -> Y0
    2,               // bit 6  -> Y2
    4,               // bit 7  -> Y4
    0,               // bit 8  -> Y0
    1,               // bit 9  -> Y1
    2,               // bit 10 -> Y2
    3,               // bit 11 -> Y3
    4,               // bit 12 -> Y4
    5                // bit 13 -> Y5
  };

  // Process/voltage/temperature corner of the DCO model (index into its
  // delay tables): SS 0.9 V 125 C, TT 1.0 V 25 C, FF 1.1 V -40 C.
  typedef enum int unsigned {
    CORNER_SS = 0,
    CORNER_TT = 1,
    CORNER_FF = 2
  } corner_t;

  // Controller state.
  typedef enum logic [1:0] {
    S_INIT  = 2'd0,  // after reset: ring held, waiting for the first start edge
    S_ALIGN = 2'd1,  // search: ring held until the next reference edge
    S_WAIT  = 2'd2,  // search: ring running, waiting for the compare edge
    S_TRACK = 2'd3   // phase tracking
  } ctrl_state_t;
endpackage
