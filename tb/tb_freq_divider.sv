// tb_freq_divider: self-checking test of the /N feedback divider.
//
// Clocks the divider with a plain clock and checks that the divided clock has
// exactly one rising edge every N input periods, a high time of N/2 periods,
// and that it stays low in reset. Runs with the default N = 4.
`timescale 1ps / 1fs
module tb_freq_divider;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0, dclk;
  int checks = 0, failures = 0, cyc = 0, last_rise = -1, high = 0, n_rise = 0;

  freq_divider dut (.clk_in(clk), .rst_n(rst_n), .clk_out(dclk));

  always #800 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  logic prev = 1'b0;
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (dclk && !prev) begin
      if (last_rise >= 0) begin
        check("period in input cycles", cyc - last_rise, N);
        check("high time", high, N / 2);
      end
      last_rise = cyc; high = 0; n_rise++;
    end
    if (dclk) high++;
    prev = dclk;
  end

  initial begin
    repeat (5) @(negedge clk) check("low in reset", int'(dclk), 0);
    rst_n = 1'b1;
    repeat (400) @(negedge clk);
    check("rising edges counted", n_rise, 400 / N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1600 * 1000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
