// loop_filter: self-sampled proportional-integral filter of the ADPLL.
//
// At each divided-clock edge (strobe d_evt) the filter computes
//   v   = Kp * eps + Ki * psi
//   code <= clamp(code_init + round(v), 0, 2^CODE_W - 1)
//   psi  <= psi + eps                      (saturating)
// using the error and integral held before the edge, so the DCO frequency
// changes only at divided edges and the integral accumulates only there, as
// in the discrete-time description of the loop. Between divided edges nothing
// changes. code_init sets the free-running (initial) frequency f0, since
// psi = eps = 0 after reset.
//
// Kp and Ki are programmable unsigned fixed-point numbers with GAIN_FRAC
// fractional bits (1.0 = 1024 by default); v is rounded half-up to an integer
// code step. The fixed-point format, the rounding, the psi width and the
// clamping of the code are this design's choices.
//
// Timing: code_o and psi_o change one time-base cycle after d_evt.
`timescale 1ps / 1fs
module loop_filter
  import adpll_pkg::*;
#(
  parameter int unsigned ERR_W     = ERR_W_DEFAULT,
  parameter int unsigned GAIN_W    = GAIN_W_DEFAULT,
  parameter int unsigned GAIN_FRAC = GAIN_FRAC_DEFAULT,
  parameter int unsigned PSI_W     = PSI_W_DEFAULT,
  parameter int unsigned CODE_W    = CODE_W_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    d_evt,
  input  logic signed [ERR_W-1:0] eps_i,
  input  logic [GAIN_W-1:0]       kp_i,
  input  logic [GAIN_W-1:0]       ki_i,
  input  logic [CODE_W-1:0]       code_init_i,
  output logic [CODE_W-1:0]       code_o,
  output logic signed [PSI_W-1:0] psi_o,
  output logic                    code_sat_o   // last update clamped the code
);

  localparam int unsigned V_W = GAIN_W + PSI_W + 3;

  logic signed [V_W-1:0]   p_term, i_term, v_fix, v_int, code_full;
  logic signed [PSI_W:0]   psi_sum;
  logic signed [PSI_W-1:0] psi_next;
  logic [CODE_W-1:0]       code_next;
  logic                    clamp;

  localparam logic signed [V_W-1:0]   CODE_MAX = V_W'((1 << CODE_W) - 1);
  localparam logic signed [PSI_W-1:0] PSI_MAX  = {1'b0, {(PSI_W-1){1'b1}}};
  localparam logic signed [PSI_W-1:0] PSI_MIN  = {1'b1, {(PSI_W-1){1'b0}}};
  localparam logic signed [V_W-1:0]   HALF     = V_W'(1) <<< (GAIN_FRAC - 1);

  always_comb begin
    p_term    = V_W'($signed({1'b0, kp_i})) * V_W'(eps_i);
    i_term    = V_W'($signed({1'b0, ki_i})) * V_W'(psi_o);
    v_fix     = p_term + i_term;
    v_int     = (v_fix + HALF) >>> GAIN_FRAC;
    code_full = v_int + V_W'($signed({1'b0, code_init_i}));
    clamp     = 1'b1;
    if (code_full < 0)             code_next = '0;
    else if (code_full > CODE_MAX) code_next = '1;
    else begin
      code_next = code_full[CODE_W-1:0];
      clamp     = 1'b0;
    end
    psi_sum = (PSI_W+1)'(psi_o) + (PSI_W+1)'(eps_i);
    if (psi_sum > (PSI_W+1)'(PSI_MAX))      psi_next = PSI_MAX;
    else if (psi_sum < (PSI_W+1)'(PSI_MIN)) psi_next = PSI_MIN;
    else                                    psi_next = psi_sum[PSI_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psi_o      <= '0;              // psi_0 = 0
      code_o     <= code_init_i;     // f = f0 until the first divided edge
      code_sat_o <= 1'b0;
    end else if (d_evt) begin
      psi_o      <= psi_next;
      code_o     <= code_next;
      code_sat_o <= clamp;
    end
  end

endmodule
