// pfd: self-sampled phase-frequency detector (state machine plus TDC).
//
// Takes one-cycle strobes for the rising edges of the reference clock (R) and
// the divided clock (D), both already brought into the time-base clock domain,
// and produces the signed timing error eps in -N_D..+N_D. The state machine
// (pfd_fsm) decides which edge opens and which closes a measurement, so that
// two edges of the same clock are never measured against each other; the
// counter-quantiser (pfd_tdc) turns the operating time into eps, saturating
// at N_D. eps is held between measurements. The state is given both as m
// and as the two-variable pair (s, m_hat) = (lead_ref_o, measuring_o).
//
// Timing: eps_o updates one time-base cycle after the closing strobe.
`timescale 1ps / 1fs
module pfd
  import adpll_pkg::*;
#(
  parameter int unsigned N_D   = N_D_DEFAULT,
  parameter int unsigned ERR_W = ERR_W_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    r_evt,
  input  logic                    d_evt,
  output logic signed [ERR_W-1:0] eps_o,
  output logic                    valid_o,
  output logic                    sat_o,
  output pfd_state_t              state_o,
  output logic                    open_o,
  output logic                    close_o,
  output logic                    lead_ref_o,   // s: reference led last
  output logic                    measuring_o   // m_hat: measuring
);

  logic close_pos, zero;

  pfd_fsm u_fsm (
    .clk         (clk),
    .rst_n       (rst_n),
    .r_evt       (r_evt),
    .d_evt       (d_evt),
    .state_o     (state_o),
    .open_o      (open_o),
    .close_o     (close_o),
    .close_pos_o (close_pos),
    .zero_o      (zero),
    .lead_ref_o  (lead_ref_o),
    .measuring_o (measuring_o)
  );

  pfd_tdc #(.N_D(N_D), .ERR_W(ERR_W)) u_tdc (
    .clk         (clk),
    .rst_n       (rst_n),
    .open_i      (open_o),
    .close_i     (close_o),
    .close_pos_i (close_pos),
    .zero_i      (zero),
    .eps_o       (eps_o),
    .valid_o     (valid_o),
    .sat_o       (sat_o)
  );

endmodule
