// tb_loop_filter: self-checking test of the self-sampled PI loop filter.
//
// Applies random errors and divided-edge strobes with several gain settings
// (including the two measured ones, Kp = 1.0 / Ki = 0.048 and Kp = 0.5 /
// Ki = 0.096) and compares code and integral with a reference written in real
// arithmetic: v = Kp*eps + Ki*psi with the old eps and psi,
// code = clamp(code_init + floor(v + 0.5)), psi += eps. Checks that nothing
// moves without a divided edge, that the update takes one cycle, and that the
// code clamps at both ends of its range.
`timescale 1ps / 1fs
module tb_loop_filter;
  logic clk = 1'b0, rst_n = 1'b0, d_evt = 1'b0;
  logic signed [3:0]  eps = '0;
  logic [11:0]        kp = 12'd1024, ki = 12'd49;
  logic [7:0]         code_init = 8'd51;
  logic [7:0]         code;
  logic signed [15:0] psi;
  logic               csat;
  int checks = 0, failures = 0, n_clamp_hi = 0, n_clamp_lo = 0;

  loop_filter dut (
    .clk(clk), .rst_n(rst_n), .d_evt(d_evt), .eps_i(eps), .kp_i(kp), .ki_i(ki),
    .code_init_i(code_init), .code_o(code), .psi_o(psi), .code_sat_o(csat)
  );

  always #10 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  int m_psi, m_code;

  task automatic run(int n, int bias);
    real v;
    int  c, e;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      e = $urandom_range(0, 14) - 7 + bias;
      if (e > 7) e = 7;
      if (e < -7) e = -7;
      eps = 4'(e);
      d_evt = ($urandom_range(0, 2) == 0);
      if (d_evt) begin
        v = real'(kp) / 1024.0 * real'(e) + real'(ki) / 1024.0 * real'(m_psi);
        c = int'(code_init) + int'($floor(v + 0.5));
        if (c > 255) begin c = 255; n_clamp_hi++; end
        if (c < 0) begin c = 0; n_clamp_lo++; end
        m_code = c;
        m_psi  = m_psi + e;
        if (m_psi > 32767) m_psi = 32767;
        if (m_psi < -32768) m_psi = -32768;
      end
      @(posedge clk); #1;
      check("code", int'(code), m_code);
      check("psi", int'(psi), m_psi);
    end
    @(negedge clk); d_evt = 0;
  endtask

  initial begin
    m_psi = 0; m_code = 51;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset code = code_init", int'(code), 51);
    check("reset psi", int'(psi), 0);
    // no divided edges: nothing changes
    repeat (20) begin
      @(negedge clk); eps = 4'sd7; d_evt = 0;
    end
    @(posedge clk); #1;
    check("held code", int'(code), 51);
    check("held psi", int'(psi), 0);
    // measured gain sets, drifting up then down (clamps at both ends)
    run(4000, 6);
    run(8000, -6);
    kp = 12'd512; ki = 12'd98;
    run(3000, 2);
    run(3000, -2);
    kp = 12'($urandom_range(0, 4095)); ki = 12'($urandom_range(0, 300));
    run(3000, 0);
    check("upper clamp exercised", int'(n_clamp_hi > 0), 1);
    check("lower clamp exercised", int'(n_clamp_lo > 0), 1);
    $display("clamps high=%0d low=%0d", n_clamp_hi, n_clamp_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 60000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
