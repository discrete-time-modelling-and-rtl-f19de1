// adpll_core: synthesizable digital part of one ADPLL node.
//
// The divider turns the DCO clock into the divided clock D. The reference R
// and D are sampled by the time-base clock clk, whose period is the TDC
// resolution (20 ps), and their rising edges become strobes. The PFD measures
// the time between a leading and a lagging edge as a saturated error eps; the
// PI loop filter updates the DCO code at every divided edge (the loop is
// self-sampled: it is clocked, in effect, by its own divided output).
//
// Interface: ref_clk and dco_clk are free-running clocks from outside; kp_i,
// ki_i and code_init_i are static configuration (gains and initial code).
// dco_code_o goes back to the DCO. The remaining outputs expose internal
// state for observation. All sequential logic except the divider runs on clk.
//
// Timing: a divided or reference edge becomes a strobe 2 to 3 clk cycles later
// (the same for both). The error is ready one cycle after the closing strobe.
// The code changes one cycle after the divided strobe, about 80 ps after the
// divided edge, and the DCO takes it at its next rising edge.
`timescale 1ps / 1fs
module adpll_core
  import adpll_pkg::*;
#(
  parameter int unsigned DIV_N     = DIV_N_DEFAULT,
  parameter int unsigned N_D       = N_D_DEFAULT,
  parameter int unsigned ERR_W     = ERR_W_DEFAULT,
  parameter int unsigned GAIN_W    = GAIN_W_DEFAULT,
  parameter int unsigned GAIN_FRAC = GAIN_FRAC_DEFAULT,
  parameter int unsigned PSI_W     = PSI_W_DEFAULT,
  parameter int unsigned CODE_W    = CODE_W_DEFAULT
) (
  input  logic                    clk,          // TDC time base
  input  logic                    rst_n,
  input  logic                    ref_clk,
  input  logic                    dco_clk,
  input  logic [GAIN_W-1:0]       kp_i,
  input  logic [GAIN_W-1:0]       ki_i,
  input  logic [CODE_W-1:0]       code_init_i,
  output logic [CODE_W-1:0]       dco_code_o,
  output logic                    div_clk_o,
  output logic signed [ERR_W-1:0] eps_o,
  output logic                    eps_valid_o,
  output logic                    eps_sat_o,
  output logic signed [PSI_W-1:0] psi_o,
  output pfd_state_t              pfd_state_o,
  output logic                    r_evt_o,
  output logic                    d_evt_o,
  output logic                    code_sat_o
);

  logic r_evt, d_evt;

  freq_divider #(.N(DIV_N)) u_div (
    .clk_in  (dco_clk),
    .rst_n   (rst_n),
    .clk_out (div_clk_o)
  );

  edge_sync u_sync_ref (.clk(clk), .rst_n(rst_n), .sig_i(ref_clk),   .rise_o(r_evt));
  edge_sync u_sync_div (.clk(clk), .rst_n(rst_n), .sig_i(div_clk_o), .rise_o(d_evt));

  pfd #(.N_D(N_D), .ERR_W(ERR_W)) u_pfd (
    .clk     (clk),
    .rst_n   (rst_n),
    .r_evt   (r_evt),
    .d_evt   (d_evt),
    .eps_o   (eps_o),
    .valid_o (eps_valid_o),
    .sat_o   (eps_sat_o),
    .state_o (pfd_state_o),
    .open_o      (),
    .close_o     (),
    .lead_ref_o  (),
    .measuring_o ()
  );

  loop_filter #(
    .ERR_W(ERR_W), .GAIN_W(GAIN_W), .GAIN_FRAC(GAIN_FRAC),
    .PSI_W(PSI_W), .CODE_W(CODE_W)
  ) u_lf (
    .clk         (clk),
    .rst_n       (rst_n),
    .d_evt       (d_evt),
    .eps_i       (eps_o),
    .kp_i        (kp_i),
    .ki_i        (ki_i),
    .code_init_i (code_init_i),
    .code_o      (dco_code_o),
    .psi_o       (psi_o),
    .code_sat_o  (code_sat_o)
  );

  assign r_evt_o = r_evt;
  assign d_evt_o = d_evt;

endmodule
