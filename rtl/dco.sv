// dco: behavioural model of the digitally controlled oscillator (not
// synthesizable; the real part is an analog ring oscillator).
//
// The output frequency is linear in the control code:
//   f = F_MIN_HZ + F_STEP_HZ * code
// with the chip's values 4 x 135 MHz and 4 x 156 kHz, so that code 0..255 spans
// about 540..699 MHz (135..175 MHz after the /4 divider). The code is sampled
// at the start of every output period, so a new code takes effect at the next
// rising edge. Period jitter is optional: each period is scaled by
// (1 + JITTER_REL * g) with g an approximately Gaussian number (sum of twelve
// uniform numbers minus six). JITTER_REL = 0.01 per DCO period gives the 0.5 %
// divided-period spread used in the measurements (four independent periods
// add up to half the relative spread); set it to 0 for a jitter-free clock.
// The code width, the sampling of the code and the jitter model are choices of
// this model. While enable is low the output stays low.
`timescale 1ps / 1fs
module dco #(
  parameter int unsigned CODE_W     = adpll_pkg::CODE_W_DEFAULT,
  parameter real         F_MIN_HZ   = 540.0e6,
  parameter real         F_STEP_HZ  = 624.0e3,
  parameter real         JITTER_REL = 0.01
) (
  input  logic              enable,
  input  logic [CODE_W-1:0] code,
  output logic              clk_out
);

  real period_ps;

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  initial clk_out = 1'b0;

  always begin
    if (!enable) begin
      clk_out = 1'b0;
      @(posedge enable);
    end
    period_ps = 1.0e12 / (F_MIN_HZ + F_STEP_HZ * real'(code));
    if (JITTER_REL != 0.0) period_ps = period_ps * (1.0 + JITTER_REL * gauss());
    clk_out = 1'b1;
    #(period_ps / 2.0);
    clk_out = 1'b0;
    #(period_ps / 2.0);
  end

endmodule
