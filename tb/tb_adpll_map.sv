// tb_adpll_map: compares the jitter-free RTL loop with the discrete-time map.
//
// The bench iterates the event map of the self-sampled loop in real
// arithmetic. Primary state: eta = (D - R)/2 and xi = (D + R)/2, with D and R
// the times to the next divided and reference edge. Each step handles the
// nearest edge:
//   sigma = sign(eta);  f_D = f0 + df * (Kp*eps + Ki*psi)
//   divided edge:  eta' = 1/(2 f_D) + eta,  xi' = 1/(2 f_D) - eta
//   reference:     eta' = eta - 1/(2 f_R),  xi' = eta + 1/(2 f_R)
//   m'   = m/2 + sigma*(1 - m^2/2)
//   top' = m^2 * top + m' * (xi' - |eta'|)
//   eps' = sign(top) * min(ceil(|top| / 20 ps), 7)
//   psi' = psi + eps            (divided edges only)
// From this it records the divided-clock frequency over time. The same upward
// step (143 -> 167 MHz) runs on the RTL node without jitter, for both measured
// gain sets. The two averaged divided-frequency curves, sampled every 0.1 us
// from 0.3 to 5 us, must agree within 1 MHz on the ramp, where the error is
// saturated, and within 2.5 MHz while settling. There the error is small, so the
// RTL's 20 ps sampling and whole-step code rounding show, while the map uses
// exact times and a real-valued control. The times at which the two curves
// first reach the reference must agree within 8 %.
`timescale 1ps / 1fs
module tb_adpll_map;
  import adpll_pkg::*;

  localparam real F0    = 135.0e6 + 156.0e3 * 51.0;   // divided frequency at code 51
  localparam real DF    = 156.0e3;
  localparam real TTDC  = 20.0e-12;
  localparam real FR    = 167.0e6;
  localparam int  AVG   = 16;
  localparam int  NSAMP = 48;                          // samples at 0.3 + 0.1*k us

  logic clk = 1'b0, rst_n = 1'b0, ref_clk = 1'b0;
  logic [11:0] kp = 12'd1024, ki = 12'd49;
  logic [7:0]  code_init = 8'd51;
  logic dco_clk, div_clk, eps_valid, eps_sat, r_evt, d_evt, code_sat;
  logic [7:0] dco_code;
  logic signed [3:0] eps;
  logic signed [15:0] psi;
  pfd_state_t pfd_state;

  adpll_top #(.JITTER_REL(0.0)) dut (
    .clk(clk), .rst_n(rst_n), .ref_clk(ref_clk), .kp_i(kp), .ki_i(ki),
    .code_init_i(code_init), .dco_clk_o(dco_clk), .div_clk_o(div_clk),
    .dco_code_o(dco_code), .eps_o(eps), .eps_valid_o(eps_valid), .eps_sat_o(eps_sat),
    .psi_o(psi), .pfd_state_o(pfd_state), .r_evt_o(r_evt), .d_evt_o(d_evt),
    .code_sat_o(code_sat)
  );

  always #10 clk = ~clk;
  always begin
    ref_clk = 1'b1; #(1.0e12 / FR / 2.0);
    ref_clk = 1'b0; #(1.0e12 / FR / 2.0);
  end

  int checks = 0, failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  real map_f[NSAMP];
  real map_reach;

  function automatic real hq(real top);
    real a, q;
    a = (top < 0.0) ? -top : top;
    if (a == 0.0) return 0.0;
    q = $ceil(a / TTDC);
    if (q > 7.0) q = 7.0;
    return (top < 0.0) ? -q : q;
  endfunction

  // iterate the map; fill map_f with the 16-period averaged divided frequency
  task automatic run_map(real kpv, real kiv, real eta0, real xi0);
    real eta, xi, m, top, e, ps, t, fd, sigma, tau, eta1, xi1, m1, top1, e1, ps1, fa;
    real dt[AVG];
    real last_d;
    int  k, nd, w;
    eta = eta0; xi = xi0; m = 0.0; top = 0.0; e = 0.0; ps = 0.0; t = 0.0;
    last_d = -1.0; nd = 0; w = 0; k = 0; map_reach = -1.0; fa = 0.0;
    while (k < NSAMP) begin
      sigma = (eta >= 0.0) ? 1.0 : -1.0;
      tau = xi - ((eta < 0.0) ? -eta : eta);
      t += tau;
      fd = F0 + DF * (kpv * e + kiv * ps);
      if (sigma < 0.0) begin
        if (last_d >= 0.0) begin
          dt[w] = t - last_d; w = (w + 1) % AVG;
          if (nd < AVG) nd++;
          fa = 0.0;
          for (int i = 0; i < nd; i++) fa += dt[i];
          fa = real'(nd) / fa;
          if (map_reach < 0.0 && nd == AVG && fa >= FR) map_reach = t * 1.0e6;
        end
        last_d = t;
        while (k < NSAMP && t >= (0.3 + 0.1 * real'(k)) * 1.0e-6) begin
          map_f[k] = fa; k++;
        end
        eta1 = 1.0 / (2.0 * fd) + eta;  xi1 = 1.0 / (2.0 * fd) - eta;
      end else begin
        eta1 = eta - 1.0 / (2.0 * FR);  xi1 = eta + 1.0 / (2.0 * FR);
      end
      m1   = m / 2.0 + sigma * (1.0 - m * m / 2.0);
      top1 = m * m * top + m1 * (xi1 - ((eta1 < 0.0) ? -eta1 : eta1));
      e1   = hq(top);
      ps1  = ps + ((sigma < 0.0) ? e : 0.0);
      eta = eta1; xi = xi1; m = m1; top = top1; e = e1; ps = ps1;
    end
  endtask

  // RTL divided-frequency monitor
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

  task automatic run_rtl(int kp_v, int ki_v, real kpv, real kiv, real eta0, real xi0);
    realtime t0;
    real rtl_reach, d, dmax;
    int k;
    run_map(kpv, kiv, eta0, xi0);
    kp = 12'(kp_v); ki = 12'(ki_v);
    rst_n = 1'b0;
    repeat (10) @(posedge clk);
    nper = 0; t_last = 0; f_avg = 0.0;
    @(posedge ref_clk);
    rst_n = 1'b1;
    t0 = $realtime;
    rtl_reach = -1.0; k = 0; dmax = 0.0;
    while (k < NSAMP) begin
      @(posedge div_clk);
      if (rtl_reach < 0.0 && nper == AVG && f_avg >= FR)
        rtl_reach = ($realtime - t0) / 1.0e6;
      while (k < NSAMP && ($realtime - t0) >= (0.3 + 0.1 * real'(k)) * 1.0e6) begin
        d = f_avg - map_f[k];
        if (d < 0.0) d = -d;
        if (d > dmax) dmax = d;
        // ramp (saturated error): 1 MHz; settling (small errors): 2.5 MHz
        check($sformatf("RTL and map agree at %0.1f us (%0.2f vs %0.2f MHz)",
                        0.3 + 0.1 * real'(k), f_avg / 1.0e6, map_f[k] / 1.0e6),
              d < ((rtl_reach < 0.0) ? 1.0e6 : 2.5e6));
        k++;
      end
    end
    $display("Kp=%0.3f Ki=%0.4f: reach f_ref at %0.3f us (RTL) / %0.3f us (map); max deviation %0.2f MHz",
             kpv, kiv, rtl_reach, map_reach, dmax / 1.0e6);
    check("RTL reaches the reference", rtl_reach > 0.0);
    check("map reaches the reference", map_reach > 0.0);
    check("reach times agree within 8 %",
          rtl_reach > 0.92 * map_reach && rtl_reach < 1.08 * map_reach);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    // gains as programmed in the RTL (1024ths), initial phases of the measured runs
    run_rtl(1024, 49, 1.0, 49.0 / 1024.0, 875.0e-12, 875.0e-12);
    run_rtl(512, 98, 0.5, 98.0 / 1024.0, -450.0e-12, 450.0e-12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #15us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
