// tb_glitch_cancel: drives the six tap inputs with independent random
// waveforms and the coarse code with random words changing at random times.
// A reference model kept here (the bit-to-tap table written out again)
// predicts each output bit: it must follow its input only at a falling edge
// of its own tap and hold otherwise. Also checks the reset value.
module tb_glitch_cancel;
  import adpll_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [CODE_W-1:COARSE_LSB] RV = 9'b100_000_111;

  logic                       rst_n;
  logic [NUM_TAPS-1:0]        y;
  logic [CODE_W-1:COARSE_LSB] code_in, code_out;
  logic [CODE_W-1:COARSE_LSB] model;
  int checks = 0, failures = 0;

  glitch_cancel #(.RESET_VAL(RV)) dut (.rst_n, .y, .code_in, .code_out);

  // bit -> tap, from the block diagram: 13->Y5 12->Y4 11->Y3 10->Y2 9->Y1
  // 8->Y0 7->Y4 6->Y2 5->Y0
  function automatic int tap_of(input int b);
    case (b)
      13: return 5;
      12: return 4;
      11: return 3;
      10: return 2;
      9:  return 1;
      8:  return 0;
      7:  return 4;
      6:  return 2;
      default: return 0;
    endcase
  endfunction

  logic [NUM_TAPS-1:0] y_prev;

  initial begin
    rst_n   = 1'b1;
    y       = '1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    y_prev  = '1;
    code_in = '0;
    #10;
    checks++;
    if (code_out !== RV) begin
      failures++;
      $display("FAIL reset value %b", code_out);
    end
    model = RV;
    rst_n = 1'b1;
    for (int step = 0; step < 4000; step++) begin
      #10;
      if ($urandom_range(0, 3) == 0) code_in = CODE_W'($urandom) >> COARSE_LSB;
      #10;
      y = NUM_TAPS'($urandom);
      // model: bits whose tap fell take the input
      for (int b = COARSE_LSB; b < CODE_W; b++)
        if (y_prev[tap_of(b)] && !y[tap_of(b)]) model[b] = code_in[b];
      y_prev = y;
      #1;
      checks++;
      if (code_out !== model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d y=%b code_in=%b out=%b model=%b",
                                    step, y, code_in, code_out, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
