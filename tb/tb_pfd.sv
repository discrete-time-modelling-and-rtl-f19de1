// tb_pfd: self-checking test of the complete phase-frequency detector.
//
// Feeds random streams of reference and divided strobes and checks the error
// against a behavioural reference: the state follows the map
// m' = m/2 + sigma*(1 - m^2/2); the operating time is the number of cycles
// from the opening edge to the closing edge, and the error is
// sign * min(operating time, N_D), ready one cycle after the closing edge and
// held otherwise.
`timescale 1ps / 1fs
module tb_pfd;
  import adpll_pkg::*;
  localparam int N_D = 7;

  logic clk = 1'b0, rst_n = 1'b0, r_evt = 1'b0, d_evt = 1'b0;
  logic signed [3:0] eps;
  logic valid, sat, open_s, close_s;
  pfd_state_t state;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_sat = 0, n_small = 0;

  pfd #(.N_D(N_D), .ERR_W(4)) dut (
    .clk(clk), .rst_n(rst_n), .r_evt(r_evt), .d_evt(d_evt), .eps_o(eps),
    .valid_o(valid), .sat_o(sat), .state_o(state), .open_o(open_s), .close_o(close_s),
    .lead_ref_o(), .measuring_o()
  );

  always #10 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  function automatic real step(real m, real sigma);
    return m / 2.0 + sigma * (1.0 - m * m / 2.0);
  endfunction

  initial begin
    real m;
    int  t_open, t, e_eps, mag;
    m = 0.0; t_open = 0; e_eps = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (t = 0; t < 40000; t++) begin
      @(negedge clk);
      check("eps", int'(eps), e_eps);
      r_evt = ($urandom_range(0, 5 + (t / 4000) % 6) == 0);
      d_evt = ($urandom_range(0, 10 - (t / 4000) % 6) == 0);
      if (r_evt || d_evt) begin
        real s1, s2;
        s1 = r_evt ? 1.0 : -1.0;
        if (r_evt && d_evt) begin
          if (m == 0.0) e_eps = 0;
          else begin
            mag = t - t_open; if (mag > N_D) mag = N_D;
            e_eps = (m > 0.0) ? mag : -mag;
            t_open = t;           // m is unchanged: close and reopen
          end
        end else if (m == 0.0) begin
          m = step(m, s1); t_open = t;
        end else begin
          s2 = step(m, s1);
          if (s2 == 0.0) begin
            mag = t - t_open; if (mag > N_D) mag = N_D;
            e_eps = (m > 0.0) ? mag : -mag;
            if (e_eps > 0) n_pos++; else n_neg++;
            if (mag == N_D) n_sat++; else n_small++;
          end
          m = s2;
        end
      end
    end
    @(negedge clk); r_evt = 0; d_evt = 0;
    check("eps final", int'(eps), e_eps);
    check("R-led errors seen", int'(n_pos > 0), 1);
    check("D-led errors seen", int'(n_neg > 0), 1);
    check("saturated errors seen", int'(n_sat > 0), 1);
    check("unsaturated errors seen", int'(n_small > 0), 1);
    $display("errors: positive=%0d negative=%0d saturated=%0d unsaturated=%0d",
             n_pos, n_neg, n_sat, n_small);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 50000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
