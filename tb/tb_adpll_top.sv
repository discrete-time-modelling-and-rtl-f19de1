// tb_adpll_top: end-to-end test of one ADPLL node at its default parameters.
//
// Reproduces the step experiment: the reference switches between 167 MHz and
// 143 MHz every 7.5 us while the loop starts from f0 = 143 MHz (code 51). It
// runs twice, with the two measured gain sets, Kp = 1.0 / Ki = 0.048 and
// Kp = 0.5 / Ki = 0.096 (1024/49 and 512/98 in the 10-fractional-bit format).
// Reference and DCO carry 0.5 % period jitter at the divided-clock level.
//
// Independent checks, from the divided-clock period measured in the bench:
//  - in the last 2 us of every step the mean divided frequency is within
//    0.3 % of the reference; the mean signed eps is within +-1 and the mean
//    |eps| below 6, so the phase error neither drifts nor sits at saturation;
//  - after the first upward step the averaged divided frequency first reaches
//    the reference after 2.4..3.8 us (first gain set) or 1.2..2.1 us (second
//    gain set), the ramp times of the measured transients;
//  - the acquisition rate, a ramp limited by the saturated error, agrees to
//    25 % with Ki * N_D * f_D * 156 kHz per divided edge;
//  - every mechanism of the loop happens: R-led and D-led measurements,
//    saturated and unsaturated errors, repeated edges of one clock inside a
//    measurement (frequency acquisition), integral moving up and down, and
//    DCO code updates.
`timescale 1ps / 1fs
module tb_adpll_top;
  import adpll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, ref_clk = 1'b0;
  logic [11:0] kp = 12'd1024, ki = 12'd49;
  logic [7:0]  code_init = 8'd51;
  logic dco_clk, div_clk, eps_valid, eps_sat, r_evt, d_evt, code_sat;
  logic [7:0] dco_code;
  logic signed [3:0] eps;
  logic signed [15:0] psi;
  pfd_state_t pfd_state;

  adpll_top dut (
    .clk(clk), .rst_n(rst_n), .ref_clk(ref_clk), .kp_i(kp), .ki_i(ki),
    .code_init_i(code_init), .dco_clk_o(dco_clk), .div_clk_o(div_clk),
    .dco_code_o(dco_code), .eps_o(eps), .eps_valid_o(eps_valid), .eps_sat_o(eps_sat),
    .psi_o(psi), .pfd_state_o(pfd_state), .r_evt_o(r_evt), .d_evt_o(d_evt),
    .code_sat_o(code_sat)
  );

  always #10 clk = ~clk;   // 20 ps TDC time base

  int checks = 0, failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference with 0.5 % period jitter
  real f_ref = 167.0e6;
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction
  always begin
    real p;
    p = 1.0e12 / f_ref * (1.0 + 0.005 * gauss());
    ref_clk = 1'b1; #(p / 2.0);
    ref_clk = 1'b0; #(p / 2.0);
  end

  // divided-frequency monitor: moving average over 16 periods
  localparam int AVG = 16;
  real     per[AVG];
  int      widx = 0, nper = 0;
  realtime t_last = 0;
  real     f_avg = 0.0;
  always @(posedge div_clk) begin
    real s;
    if (t_last > 0) begin
      per[widx] = $realtime - t_last;
      widx = (widx + 1) % AVG;
      if (nper < AVG) nper++;
      s = 0.0;
      for (int i = 0; i < nper; i++) s += per[i];
      f_avg = real'(nper) * 1.0e12 / s;
    end
    t_last = $realtime;
  end

  // mechanism counters
  int n_rled = 0, n_dled = 0, n_sat = 0, n_unsat = 0, n_rrun = 0, n_drun = 0;
  int n_psi_up = 0, n_psi_dn = 0, n_code = 0, n_coinc = 0, n_switch = 0;
  logic signed [15:0] psi_prev = '0;
  logic [7:0] code_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (eps_valid && eps > 0) n_rled++;
    if (eps_valid && eps < 0) n_dled++;
    if (eps_valid && eps_sat) n_sat++;
    if (eps_valid && !eps_sat && eps != 0) n_unsat++;
    if (r_evt && !d_evt && pfd_state == M_REF) n_rrun++;
    if (d_evt && !r_evt && pfd_state == M_DIV) n_drun++;
    if (r_evt && d_evt && pfd_state == M_WAIT) n_coinc++;
    if (psi > psi_prev) n_psi_up++;
    if (psi < psi_prev) n_psi_dn++;
    if (dco_code != code_prev) n_code++;
    psi_prev <= psi;
    code_prev <= dco_code;
  end

  // mean divided frequency and mean |eps| over a window
  task automatic window_stats(realtime len, output real f_mean, output real eps_mean,
                              output real eps_avg);
    int nd, ne, se, ss;
    realtime t0, t1;
    nd = 0; ne = 0; se = 0; ss = 0;
    @(posedge div_clk);
    t0 = $realtime;
    t1 = t0;
    while ($realtime - t0 < len) begin
      @(posedge div_clk);
      nd++;
      t1 = $realtime;
      se += (eps < 0) ? -int'(eps) : int'(eps);
      ss += int'(eps);
      ne++;
    end
    f_mean = real'(nd) * 1.0e12 / (t1 - t0);
    eps_mean = real'(se) / real'(ne);
    eps_avg = real'(ss) / real'(ne);
  endtask

  task automatic run_set(int kp_v, int ki_v, real t_lo_us, real t_hi_us);
    real fm, em, ea, t_reach, rate, rate_exp, f_a, f_b;
    realtime t_sw, t_a;
    bit reached;
    kp = 12'(kp_v); ki = 12'(ki_v);
    f_ref = 167.0e6;
    rst_n = 1'b0;
    repeat (10) @(posedge clk);
    nper = 0; t_last = 0; f_avg = 0.0;
    rst_n = 1'b1;
    t_sw = $realtime;
    // upward step: 143 -> 167 MHz
    reached = 0; t_reach = 0.0;
    t_a = 0; f_a = 0.0; f_b = 0.0;
    while ($realtime - t_sw < 5.5e6) begin
      @(posedge div_clk);
      if (nper == AVG && f_a == 0.0 && f_avg > 147.0e6) begin f_a = f_avg; t_a = $realtime; end
      if (nper == AVG && f_b == 0.0 && f_avg > 160.0e6) begin
        f_b = f_avg;
        rate = (f_b - f_a) / (($realtime - t_a) * 1.0e-12);
      end
      if (!reached && nper == AVG && f_avg >= f_ref) begin
        reached = 1;
        t_reach = ($realtime - t_sw) / 1.0e6;
      end
    end
    rate_exp = real'(ki_v) / 1024.0 * 7.0 * 155.0e6 * 156.0e3;
    $display("Kp=%0d/1024 Ki=%0d/1024: up-step reaches f_ref after %0.2f us; ramp %0.2f MHz/us (expected %0.2f)",
             kp_v, ki_v, t_reach, rate / 1.0e12, rate_exp / 1.0e12);
    check("up-step reaches the reference", reached);
    check("up-step ramp time matches the measured transient",
          t_reach >= t_lo_us && t_reach <= t_hi_us);
    check("ramp rate set by the saturated error and Ki",
          rate > 0.75 * rate_exp && rate < 1.25 * rate_exp);
    window_stats(2.0e6, fm, em, ea);
    $display("  locked at 167 MHz: f_D = %0.3f MHz, mean eps = %0.2f, mean |eps| = %0.2f",
             fm / 1.0e6, ea, em);
    check("frequency lock at 167 MHz", fm > 167.0e6 * 0.997 && fm < 167.0e6 * 1.003);
    check("phase lock at 167 MHz", ea >= -1.0 && ea <= 1.0 && em < 6.0);
    // downward step: 167 -> 143 MHz
    f_ref = 143.0e6; n_switch++;
    t_sw = $realtime;
    while ($realtime - t_sw < 5.5e6) @(posedge div_clk);
    window_stats(2.0e6, fm, em, ea);
    $display("  locked at 143 MHz: f_D = %0.3f MHz, mean eps = %0.2f, mean |eps| = %0.2f",
             fm / 1.0e6, ea, em);
    check("frequency lock at 143 MHz", fm > 143.0e6 * 0.997 && fm < 143.0e6 * 1.003);
    check("phase lock at 143 MHz", ea >= -1.0 && ea <= 1.0 && em < 6.0);
    f_ref = 167.0e6; n_switch++;
  endtask

  initial begin
    repeat (5) @(posedge clk);
    run_set(1024, 49, 2.4, 3.8);
    run_set(512, 98, 1.2, 2.1);
    $display("mechanisms: R-led=%0d D-led=%0d saturated=%0d unsaturated=%0d repeated R=%0d repeated D=%0d",
             n_rled, n_dled, n_sat, n_unsat, n_rrun, n_drun);
    $display("            psi up=%0d psi down=%0d code updates=%0d coincident=%0d switches=%0d",
             n_psi_up, n_psi_dn, n_code, n_coinc, n_switch);
    check("R-led measurements", n_rled > 0);
    check("D-led measurements", n_dled > 0);
    check("saturated errors", n_sat > 0);
    check("unsaturated errors", n_unsat > 0);
    check("repeated reference edges in a measurement", n_rrun > 0);
    check("repeated divided edges in a measurement", n_drun > 0);
    check("integral rises", n_psi_up > 0);
    check("integral falls", n_psi_dn > 0);
    check("DCO code updates", n_code > 0);
    check("reference switches", n_switch == 4);
    check("code stays inside its range", !code_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
