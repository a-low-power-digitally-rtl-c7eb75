// tb_freq_divider: drives the divider with a free-running clock and checks
// that, after each asynchronous reset, the feedback clock rises on exactly
// the N-th input rising edge, then every N edges, and is high for N/2 edges.
// Runs the default N = 40 and an odd ratio N = 5.
module tb_freq_divider;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0;
  logic rst_n;
  logic fb40, fb5;
  int   checks = 0, failures = 0;

  freq_divider             u40 (.clk, .rst_n, .fb_clk(fb40));
  freq_divider #(.N(5))    u5  (.clk, .rst_n, .fb_clk(fb5));

  always #1000 clk = ~clk;

  // edge counters since the last reset release
  int n_edges = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_edges <= 0;
    else        n_edges <= n_edges + 1;
  end

  // Expected level after the k-th rising edge since reset (k counted from 1):
  // low before edge N, then high when (k mod N) < N/2.
  function automatic bit exp_fb(input int k, input int n);
    if (k < n) return 1'b0;
    return (k % n) < (n / 2);
  endfunction

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks += 2;
      if (fb40 !== exp_fb(n_edges, 40)) begin
        failures++;
        $display("FAIL N=40 after edge %0d fb=%b", n_edges, fb40);
      end
      if (fb5 !== exp_fb(n_edges, 5)) begin
        failures++;
        $display("FAIL N=5 after edge %0d fb=%b", n_edges, fb5);
      end
    end
  end

  initial begin
    rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    #3500 rst_n = 1'b1;
    repeat (130) @(posedge clk);
    #300 rst_n = 1'b0;           // reset in the middle of a count
    #2500 rst_n = 1'b1;
    repeat (97) @(posedge clk);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
