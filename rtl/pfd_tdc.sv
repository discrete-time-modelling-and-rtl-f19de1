// pfd_tdc: operating-time measurement and timing-error quantiser of the PFD.
//
// While a measurement is open, a saturating counter counts periods of the
// time-base clock, whose period is the TDC resolution tau_TDC (20 ps on the
// chip). When the measurement closes, the error register takes
//   eps = sign * min(ceil(tau_op / tau_TDC), N_D)
// where tau_op is the time from the opening edge to the closing edge, i.e.
// the number of clock cycles between the two strobes, and sign is + when a
// reference edge opened the measurement and - when a divided edge did. The
// register holds its value in the waiting state and through a repeated edge
// of the same kind, so the error is ready for use after the closing edge.
// A zero-length measurement (coincident edges) loads eps = 0.
//
// The quantiser law and N_D follow the source description. Counting time-base cycles in
// place of a delay line is this design's own realisation of the TDC.
//
// Timing: open_i / close_i are the one-cycle strobes from pfd_fsm. eps_o
// changes one cycle after close_i; valid_o pulses in that cycle.
`timescale 1ps / 1fs
module pfd_tdc
  import adpll_pkg::*;
#(
  parameter int unsigned N_D   = N_D_DEFAULT,
  parameter int unsigned ERR_W = ERR_W_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    open_i,
  input  logic                    close_i,
  input  logic                    close_pos_i,
  input  logic                    zero_i,
  output logic signed [ERR_W-1:0] eps_o,
  output logic                    valid_o,
  output logic                    sat_o      // last closed measurement saturated
);

  localparam int unsigned CNT_W = $clog2(N_D + 1);
  localparam logic [CNT_W-1:0] CNT_MAX = CNT_W'(N_D - 1);

  logic [CNT_W-1:0] cnt_q;     // cycles elapsed since the opening strobe, minus one
  logic             meas_q;    // a measurement is open
  logic [CNT_W-1:0] mag;       // min(elapsed cycles, N_D)

  assign mag = CNT_W'(cnt_q) + CNT_W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      meas_q  <= 1'b0;
      eps_o   <= '0;               // eps_0 = 0
      valid_o <= 1'b0;
      sat_o   <= 1'b0;
    end else begin
      valid_o <= close_i | zero_i;
      if (zero_i) begin
        eps_o <= '0;
        sat_o <= 1'b0;
      end else if (close_i) begin
        eps_o <= close_pos_i ? ERR_W'($signed({1'b0, mag})) : -ERR_W'($signed({1'b0, mag}));
        sat_o <= (cnt_q == CNT_MAX);
      end
      if (open_i) begin
        meas_q <= 1'b1;
        cnt_q  <= '0;
      end else if (close_i) begin
        meas_q <= 1'b0;
      end else if (meas_q && cnt_q != CNT_MAX) begin
        cnt_q <= cnt_q + CNT_W'(1);
      end
    end
  end

endmodule
