// adpll_top: one ADPLL node with its oscillator, ready to simulate.
//
// Joins the digital core (divider, edge sampling, PFD, PI filter) with the
// behavioural DCO model in a closed loop: the filter's code sets the DCO
// frequency, the DCO clock is divided by N and compared with the reference.
// In lock the divided clock follows the reference in frequency and phase and
// the DCO runs at N times the reference frequency.
//
// Ports: clk is the TDC time base (period tau_TDC = 20 ps), ref_clk the
// reference, kp_i / ki_i the programmable gains in unsigned fixed point with
// 10 fractional bits, code_init_i the code of the initial frequency f0. The
// other outputs make the loop observable. Reset is asynchronous, active low;
// the DCO is held stopped while reset is asserted.
`timescale 1ps / 1fs
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned DIV_N      = DIV_N_DEFAULT,
  parameter int unsigned N_D        = N_D_DEFAULT,
  parameter int unsigned ERR_W      = ERR_W_DEFAULT,
  parameter int unsigned GAIN_W     = GAIN_W_DEFAULT,
  parameter int unsigned GAIN_FRAC  = GAIN_FRAC_DEFAULT,
  parameter int unsigned PSI_W      = PSI_W_DEFAULT,
  parameter int unsigned CODE_W     = CODE_W_DEFAULT,
  parameter real         F_MIN_HZ   = 540.0e6,
  parameter real         F_STEP_HZ  = 624.0e3,
  parameter real         JITTER_REL = 0.01
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ref_clk,
  input  logic [GAIN_W-1:0]       kp_i,
  input  logic [GAIN_W-1:0]       ki_i,
  input  logic [CODE_W-1:0]       code_init_i,
  output logic                    dco_clk_o,
  output logic                    div_clk_o,
  output logic [CODE_W-1:0]       dco_code_o,
  output logic signed [ERR_W-1:0] eps_o,
  output logic                    eps_valid_o,
  output logic                    eps_sat_o,
  output logic signed [PSI_W-1:0] psi_o,
  output pfd_state_t              pfd_state_o,
  output logic                    r_evt_o,
  output logic                    d_evt_o,
  output logic                    code_sat_o
);

  adpll_core #(
    .DIV_N(DIV_N), .N_D(N_D), .ERR_W(ERR_W), .GAIN_W(GAIN_W),
    .GAIN_FRAC(GAIN_FRAC), .PSI_W(PSI_W), .CODE_W(CODE_W)
  ) u_core (
    .clk         (clk),
    .rst_n       (rst_n),
    .ref_clk     (ref_clk),
    .dco_clk     (dco_clk_o),
    .kp_i        (kp_i),
    .ki_i        (ki_i),
    .code_init_i (code_init_i),
    .dco_code_o  (dco_code_o),
    .div_clk_o   (div_clk_o),
    .eps_o       (eps_o),
    .eps_valid_o (eps_valid_o),
    .eps_sat_o   (eps_sat_o),
    .psi_o       (psi_o),
    .pfd_state_o (pfd_state_o),
    .r_evt_o     (r_evt_o),
    .d_evt_o     (d_evt_o),
    .code_sat_o  (code_sat_o)
  );

  dco #(
    .CODE_W(CODE_W), .F_MIN_HZ(F_MIN_HZ), .F_STEP_HZ(F_STEP_HZ),
    .JITTER_REL(JITTER_REL)
  ) u_dco (
    .enable  (rst_n),
    .code    (dco_code_o),
    .clk_out (dco_clk_o)
  );

endmodule
