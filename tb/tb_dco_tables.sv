// tb_dco_tables: runs the DCO characterisation workload at all three
// corners. Three copies of the model (SS 0.9 V 125 C, TT 1.0 V 25 C,
// FF 1.1 V -40 C) run side by side on the same code. Each tuning stage is
// swept as the original period tables do, and each measured period is
// compared with the tabulated period, within 0.5 %.
//   2nd fine stage : fine code 00-000 .. 00-111 (code[2:0])
//   1st fine stage : fine code 00-000 .. 11-000 (code[4:3])
//   2nd coarse     : code[10:5] rows with the short-path pattern 000/001/
//                    011/111 and, under 111, every AND-chain combination
//   1st coarse     : code[13:11] = 000 .. 111 with code[10:5] = 000111
// Left out:
//  * two rows of the 2nd-coarse table, 000-010001 and 000-100011. They
//    change an AND-chain select while short paths are still active; their
//    steps (about 98 ps at TT) come from a decoder that is not modelled;
//  * the FF entries of the multi-bit 2nd-fine rows, which do not add up
//    from the single-bit steps.
// It also checks the output range end points at TT: code 0 runs at
// 949.6 MHz or above, and the all-ones code reaches down to 170 MHz or below.
// Each point holds the rings, applies the code, releases them and measures
// the fifth period of each.
module tb_dco_tables;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  logic                       rst_n;
  logic [CODE_W-1:COARSE_LSB] code_c;
  logic [COARSE_LSB-1:0]      code_f;
  logic [NUM_TAPS-1:0]        y_ss, y_tt, y_ff;
  logic [2:0]                 out;   // {FF, TT, SS} outputs

  int checks = 0, failures = 0;

  dco_model #(.CORNER(CORNER_SS)) dut_ss (.rst_n, .code_c, .code_f, .y(y_ss), .dco_out(out[0]));
  dco_model #(.CORNER(CORNER_TT)) dut_tt (.rst_n, .code_c, .code_f, .y(y_tt), .dco_out(out[1]));
  dco_model #(.CORNER(CORNER_FF)) dut_ff (.rst_n, .code_c, .code_f, .y(y_ff), .dco_out(out[2]));

  realtime last_rise [3] = '{0, 0, 0};
  realtime period    [3] = '{0, 0, 0};

  for (genvar g = 0; g < 3; g++) begin : g_meas
    always @(posedge out[g]) begin
      period[g]    = $realtime - last_rise[g];
      last_rise[g] = $realtime;
    end
  end

  // SS is the slowest corner: five of its periods cover five of the others.
  task automatic measure(input code_t c);
    rst_n  = 1'b0;
    code_c = c[CODE_W-1:COARSE_LSB];
    code_f = c[COARSE_LSB-1:0];
    #40000;
    rst_n = 1'b1;
    repeat (5) @(posedge out[0]);
  endtask

  string corner_name [3] = '{"SS", "TT", "FF"};
  real   worst_dev = 0.0;   // largest relative deviation seen, %

  // use_c[k] = 0 leaves corner k of this row unchecked
  task automatic check_row(input string table_name, input code_t c,
                           input real ss, input real tt, input real ff,
                           input bit [2:0] use_c = 3'b111);
    real tab [3];
    tab = '{ss, tt, ff};
    measure(c);
    for (int k = 0; k < 3; k++) begin
      if (!use_c[k]) continue;
      checks++;
      if (100.0 * (period[k] - tab[k]) / tab[k] > worst_dev)  worst_dev = 100.0 * (period[k] - tab[k]) / tab[k];
      if (100.0 * (tab[k] - period[k]) / tab[k] > worst_dev)  worst_dev = 100.0 * (tab[k] - period[k]) / tab[k];
      if (period[k] < tab[k] * 0.995 || period[k] > tab[k] * 1.005) begin
        failures++;
        $display("FAIL %s %s code %b: %0.2f ps, table %0.2f ps",
                 table_name, corner_name[k], c, period[k], tab[k]);
      end
    end
  endtask

  // {code[13:11], code[10:5], code[4:0]}
  function automatic code_t mk(input logic [2:0] c1, input logic [5:0] c2, input logic [4:0] f);
    return {c1, c2, f};
  endfunction

  initial begin
    rst_n  = 1'b1;
    code_c = '0;
    code_f = '0;
    #1 rst_n = 1'b0;

    // 2nd fine stage
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00000), 1996.84, 1053.02, 656.54);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00001), 2001.64, 1056.90, 672.36);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00010), 2009.84, 1062.02, 675.46);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00011), 2017.84, 1065.88, 678.48, 3'b011);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00100), 2025.44, 1070.60, 681.94);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00101), 2027.64, 1074.72, 685.08, 3'b011);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00110), 2033.84, 1078.94, 688.06, 3'b011);
    check_row("fine2", mk(3'b000, 6'b000000, 5'b00111), 2041.64, 1083.06, 691.02, 3'b011);
    // 1st fine stage
    check_row("fine1", mk(3'b000, 6'b000000, 5'b01000), 2039.44, 1078.00, 672.98);
    check_row("fine1", mk(3'b000, 6'b000000, 5'b10000), 2085.04, 1102.08, 688.48);
    check_row("fine1", mk(3'b000, 6'b000000, 5'b11000), 2130.04, 1126.90, 705.02);
    // 2nd coarse stage
    check_row("coarse2", mk(3'b000, 6'b001000, 5'b0), 2189.80, 1159.40,  724.48);
    check_row("coarse2", mk(3'b000, 6'b000001, 5'b0), 2403.20, 1266.94,  788.68);
    check_row("coarse2", mk(3'b000, 6'b000011, 5'b0), 2822.60, 1492.14,  927.24);
    check_row("coarse2", mk(3'b000, 6'b000111, 5'b0), 3264.80, 1727.08, 1073.76);
    check_row("coarse2", mk(3'b000, 6'b001111, 5'b0), 3467.80, 1838.10, 1142.46);
    check_row("coarse2", mk(3'b000, 6'b010111, 5'b0), 3647.20, 1932.66, 1203.50);
    check_row("coarse2", mk(3'b000, 6'b011111, 5'b0), 3846.60, 2043.20, 1275.04);
    check_row("coarse2", mk(3'b000, 6'b100111, 5'b0), 4018.00, 2139.80, 1336.64);
    check_row("coarse2", mk(3'b000, 6'b101111, 5'b0), 4220.20, 2249.00, 1405.62);
    check_row("coarse2", mk(3'b000, 6'b110111, 5'b0), 4396.40, 2344.60, 1466.34);
    check_row("coarse2", mk(3'b000, 6'b111111, 5'b0), 4599.20, 2453.00, 1535.62);
    // 1st coarse stage
    check_row("coarse1", mk(3'b001, 6'b000111, 5'b0),  4252.60, 2256.00, 1404.66);
    check_row("coarse1", mk(3'b010, 6'b000111, 5'b0),  5241.00, 2784.40, 1727.18);
    check_row("coarse1", mk(3'b011, 6'b000111, 5'b0),  6248.80, 3314.00, 2058.00);
    check_row("coarse1", mk(3'b100, 6'b000111, 5'b0),  7212.20, 3809.80, 2345.20);
    check_row("coarse1", mk(3'b101, 6'b000111, 5'b0),  8204.20, 4347.20, 2680.20);
    check_row("coarse1", mk(3'b110, 6'b000111, 5'b0),  9202.00, 4871.60, 3004.20);
    check_row("coarse1", mk(3'b111, 6'b000111, 5'b0), 10191.40, 5403.20, 3335.20);

    // output range end points at TT (1 / 949.6 MHz = 1053.1 ps, 1 / 170 MHz = 5882.4 ps)
    measure('0);
    checks++;
    if (period[1] > 1053.1) begin
      failures++;
      $display("FAIL fastest TT period %0.2f ps above 1053.1 ps", period[1]);
    end
    measure('1);
    checks++;
    if (period[1] < 5882.4) begin
      failures++;
      $display("FAIL slowest TT period %0.2f ps below 5882.4 ps", period[1]);
    end
    $display("TT range: slowest period %0.2f ps", period[1]);
    $display("largest deviation from the tables: %0.3f %%", worst_dev);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
