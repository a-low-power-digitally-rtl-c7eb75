// dco_model: behavioural model of the four-stage digitally controlled ring
// oscillator (not synthesizable: the real part is a custom standard-cell
// ring whose delays are analog quantities).
//
// Ring, from the enable NAND around to the feedback:
//   NAND(rst_n, Y0) -> LV4 stage (code[13])         -> Y5
//                   -> LV3 stage (code[12], M code[7]) -> Y4
//                   -> LV2 stage (code[11])         -> Y3   (1st coarse: IHDC)
//                   -> 4-AND chain (code[10], M code[6]) -> Y2
//                   -> 2-AND chain (code[9])        -> Y1
//                   -> 1-AND chain (code[8], M code[5]) -> Y0 (2nd coarse)
//   Y0 -> output buffer -> dco_out.
// The three M bits select, at the Y4, Y2 and Y0 multiplexers, between the
// previous stage (1) and a short path taken from the NAND output through a
// buffer (0), which skips all earlier stages and raises the fastest
// frequency. Fine bits [4:0] change the loading of the NAND output and so
// its delay; they never switch a path and need no retiming.
//
// Delays are fitted to the periods tabulated for the three corners (SS
// 0.9 V 125 C, TT 1.0 V 25 C, FF 1.1 V -40 C), selected by CORNER (TT by
// default). At TT the period is 1053.02 ps with every bit 0 and 1727.08 ps
// with only the M bits set; level-2/3/4 cells add 528.92/1057.32/2082.72
// ps, the AND chains 111.02/205.58/412.72 ps, the RC loads 24.98/49.06 ps
// and the gate loads 3.88/9.00/17.58 ps per period. How the fixed delay is
// split among NAND, buffer and multiplexers is this model's own choice; it
// reproduces the tabulated M=000/001/011/111 periods at every corner.
// Contributions add linearly; the tables only vary one stage at a time.
// In the FF column of the gate-load table the first step is 15.82 ps and
// the following ones about 3 ps, which no additive model follows; the
// single-bit values are used.
//
// Interface: parameter CORNER; rst_n is the ring enable (0 holds the ring with dco_out high);
// code_c[13:5] are the retimed coarse bits, code_f[4:0] the fine bits;
// y[5:0] are the stage outputs used to clock the glitch cancellation cells.
module dco_model
  import adpll_pkg::*;
#(
  parameter corner_t CORNER = CORNER_TT
) (
  input  logic                        rst_n,
  input  logic [CODE_W-1:COARSE_LSB]  code_c,
  input  logic [COARSE_LSB-1:0]       code_f,
  output logic [NUM_TAPS-1:0]         y,
  output logic                        dco_out
);
  timeunit 1ps;
  timeprecision 1fs;

  // Tabulated periods (ps) per corner {SS, TT, FF}: all bits 0, and the
  // short-path patterns M = 001, 011, 111 with every other bit 0.
  localparam real P_BASE [3] = '{1996.84, 1053.02, 656.54};
  localparam real P_M001 [3] = '{2403.20, 1266.94, 788.68};
  localparam real P_M011 [3] = '{2822.60, 1492.14, 927.24};
  localparam real P_M111 [3] = '{3264.80, 1727.08, 1073.76};
  // Period added by each delay cell and load, from the single-bit rows.
  localparam real P_LV4  [3] = '{3947.40, 2082.72, 1271.44};
  localparam real P_LV3  [3] = '{1976.20, 1057.32,  653.42};
  localparam real P_LV2  [3] = '{ 987.80,  528.92,  330.90};
  localparam real P_AND4 [3] = '{ 753.20,  412.72,  262.88};
  localparam real P_AND2 [3] = '{ 382.40,  205.58,  129.74};
  localparam real P_AND1 [3] = '{ 203.00,  111.02,   68.70};
  // Fine loads on the NAND output, bits 0..4, per corner.
  localparam real P_FINE [3][COARSE_LSB] = '{
    '{ 4.80, 13.00, 28.60, 42.60, 88.20},
    '{ 3.88,  9.00, 17.58, 24.98, 49.06},
    '{15.82, 18.92, 25.40, 16.44, 31.94}};

  localparam int unsigned C = int'(CORNER);

  // Half-period (loop) delays in ps. The all-zero path (NAND, short-path
  // buffer, last multiplexer) is split as 226.51 : 150 : 150 at TT and
  // scaled to the corner's base period; each pair of multiplexers added by
  // an M bit shares that step; the LV4 multiplexer replaces the buffer.
  localparam real K0     = P_BASE[C] / 1053.02;
  localparam real T_NAND = 226.51 * K0;
  localparam real T_BUF  = 150.0 * K0;   // short-path buffer
  localparam real T_OUT  = 20.0;         // output buffer (outside the loop)
  localparam real T_M0   = 150.0 * K0;
  localparam real T_M1   = (P_M001[C] - P_BASE[C]) / 4.0;
  localparam real T_M2   = T_M1;
  localparam real T_M3   = (P_M011[C] - P_M001[C]) / 4.0;
  localparam real T_M4   = T_M3;
  localparam real T_M5   = T_BUF + (P_M111[C] - P_M011[C]) / 2.0;

  logic nand_out, short_line;

  function automatic real fine_delay(input logic [COARSE_LSB-1:0] f);
    real d;
    d = 0.0;
    for (int i = 0; i < int'(COARSE_LSB); i++)
      if (f[i]) d += P_FINE[C][i] / 2.0;
    return d;
  endfunction

  // Enable NAND with load-dependent delay.
  // Each delay process evaluates once at start-up and then on every change
  // of its inputs, so the ring starts from any power-up state.
  always begin
    nand_out <= #(T_NAND + fine_delay(code_f)) ~(rst_n & y[0]);
    @(rst_n or y[0]);
  end

  always begin
    short_line <= #(T_BUF) nand_out;
    @(nand_out);
  end

  dco_stage #(.HAS_SHORT(1'b0), .T_CELL(P_LV4[C] / 2.0), .T_MUX(T_M5)) u_lv4 (
    .prev(nand_out), .short_in(1'b0), .sel_l(code_c[13]), .sel_m(1'b1), .y(y[5]));
  dco_stage #(.HAS_SHORT(1'b1), .T_CELL(P_LV3[C] / 2.0), .T_MUX(T_M4)) u_lv3 (
    .prev(y[5]), .short_in(short_line), .sel_l(code_c[12]), .sel_m(code_c[7]), .y(y[4]));
  dco_stage #(.HAS_SHORT(1'b0), .T_CELL(P_LV2[C] / 2.0), .T_MUX(T_M3)) u_lv2 (
    .prev(y[4]), .short_in(1'b0), .sel_l(code_c[11]), .sel_m(1'b1), .y(y[3]));
  dco_stage #(.HAS_SHORT(1'b1), .T_CELL(P_AND4[C] / 2.0), .T_MUX(T_M2)) u_and4 (
    .prev(y[3]), .short_in(short_line), .sel_l(code_c[10]), .sel_m(code_c[6]), .y(y[2]));
  dco_stage #(.HAS_SHORT(1'b0), .T_CELL(P_AND2[C] / 2.0), .T_MUX(T_M1)) u_and2 (
    .prev(y[2]), .short_in(1'b0), .sel_l(code_c[9]), .sel_m(1'b1), .y(y[1]));
  dco_stage #(.HAS_SHORT(1'b1), .T_CELL(P_AND1[C] / 2.0), .T_MUX(T_M0)) u_and1 (
    .prev(y[1]), .short_in(short_line), .sel_l(code_c[8]), .sel_m(code_c[5]), .y(y[0]));

  always begin
    dco_out <= #(T_OUT) y[0];
    @(y[0]);
  end

endmodule
