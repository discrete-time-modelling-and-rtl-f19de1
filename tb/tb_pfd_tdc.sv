// tb_pfd_tdc: self-checking test of the PFD time measurement and quantiser.
//
// Opens and closes measurements with chosen gaps of 1..12 cycles and both
// signs, and checks eps = sign * min(gap, N_D), the one-cycle latency of the
// result, the saturation flag, that the value is held between measurements
// and that a zero-length measurement gives 0.
`timescale 1ps / 1fs
module tb_pfd_tdc;
  localparam int N_D = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic open_i = 0, close_i = 0, close_pos_i = 0, zero_i = 0;
  logic signed [3:0] eps;
  logic valid, sat;
  int checks = 0, failures = 0, n_sat = 0;

  pfd_tdc #(.N_D(N_D), .ERR_W(4)) dut (
    .clk(clk), .rst_n(rst_n), .open_i(open_i), .close_i(close_i),
    .close_pos_i(close_pos_i), .zero_i(zero_i), .eps_o(eps), .valid_o(valid), .sat_o(sat)
  );

  always #10 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // open, wait gap cycles, close; then check result one cycle after close
  task automatic measure(int gap, bit pos);
    int e;
    int held;
    @(negedge clk); open_i = 1;
    @(negedge clk); open_i = 0;
    held = int'(eps);
    repeat (gap - 1) begin
      @(negedge clk);
      check("held during measurement", int'(eps), held);
    end
    close_pos_i = pos; close_i = 1;
    #1 check("no result before the closing edge", int'(valid), 0);
    @(negedge clk); close_i = 0;
    e = (gap < N_D) ? gap : N_D;
    if (!pos) e = -e;
    check("valid one cycle after close", int'(valid), 1);
    check($sformatf("eps gap=%0d", gap), int'(eps), e);
    check("saturation flag", int'(sat), int'(gap >= N_D));
    if (gap >= N_D) n_sat++;
    repeat ($urandom_range(1, 5)) begin
      @(negedge clk);
      check("held while waiting", int'(eps), e);
      check("valid low while waiting", int'(valid), 0);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset value", int'(eps), 0);
    for (int g = 1; g <= 12; g++) begin
      measure(g, 1'b1);
      measure(g, 1'b0);
    end
    for (int k = 0; k < 200; k++) measure($urandom_range(1, 15), 1'($urandom_range(0, 1)));
    // coincident edges in the waiting state: zero error
    @(negedge clk); zero_i = 1;
    @(negedge clk); zero_i = 0;
    check("zero-length measurement", int'(eps), 0);
    check("zero-length valid", int'(valid), 1);
    // back-to-back: close and reopen in the same cycle
    @(negedge clk); open_i = 1;
    @(negedge clk); open_i = 0;
    @(negedge clk);
    @(negedge clk); close_i = 1; close_pos_i = 1; open_i = 1;
    @(negedge clk); close_i = 0; open_i = 0;
    check("close+reopen eps", int'(eps), 3);
    @(negedge clk); close_i = 1; close_pos_i = 0;
    @(negedge clk); close_i = 0;
    check("second measurement after reopen", int'(eps), -2);
    check("saturation exercised", int'(n_sat > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
