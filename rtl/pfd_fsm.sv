// pfd_fsm: state machine of the self-sampled phase-frequency detector.
//
// The detector tracks which clock led. From the waiting state (m = 0) a
// reference edge (R) moves it to m = +1 and a divided edge (D) to m = -1; this
// opens a measurement. A further edge of the same kind keeps the state (the
// measurement goes on, so runs such as RRR or DDD do not restart it). An edge
// of the other kind closes the measurement and returns to m = 0. This is the
// three-state form of the detector; it is equivalent to the two-variable form
// (leading clock s, mode m_hat) through (0,0)->0, (0,1)->-1, (1,1)->+1.
//
// Both edges arrive as one-cycle strobes in the time-base clock domain. The
// text handles edges one at a time; coincident R and D in one cycle are this
// design's own rule: in m = 0 they open and close a zero-length measurement
// (close with zero error, state stays 0); in m = +1 the D closes the running
// measurement and the R opens a new one (state stays +1); m = -1 likewise.
//
// Outputs (combinational from the current state and strobes, valid in the
// cycle of the edge): open_o (a measurement starts this cycle), close_o (the
// running measurement ends this cycle), close_sign_o (+1 = it was opened by R),
// zero_o (coincident edges in the waiting state). state_o is registered.
//
// lead_ref_o and measuring_o give the same state in the detector's original
// two-variable form: lead_ref_o is s (1 = the reference led the last
// measurement, 0 = the divided clock did) and measuring_o is m_hat
// (1 = measuring, 0 = waiting). s is kept in its own flip-flop because it
// survives the waiting state; the pair (s, m_hat) = (0,0) or (1,0) maps to
// m = 0, (0,1) to m = -1 and (1,1) to m = +1. After reset s = 0.
`timescale 1ps / 1fs
module pfd_fsm
  import adpll_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       r_evt,        // reference rising edge seen this cycle
  input  logic       d_evt,        // divided rising edge seen this cycle
  output pfd_state_t state_o,      // m just before the next edge
  output logic       open_o,
  output logic       close_o,
  output logic       close_pos_o,  // closed measurement was opened by R
  output logic       zero_o,
  output logic       lead_ref_o,   // s
  output logic       measuring_o   // m_hat
);

  pfd_state_t state_q, state_d;

  always_comb begin
    state_d     = state_q;
    open_o      = 1'b0;
    close_o     = 1'b0;
    close_pos_o = 1'b0;
    zero_o      = 1'b0;
    unique case (state_q)
      M_WAIT: begin
        if (r_evt && d_evt) begin
          zero_o = 1'b1;
        end else if (r_evt) begin
          state_d = M_REF;
          open_o  = 1'b1;
        end else if (d_evt) begin
          state_d = M_DIV;
          open_o  = 1'b1;
        end
      end
      M_REF: begin
        if (d_evt) begin
          close_o     = 1'b1;
          close_pos_o = 1'b1;
          if (r_evt) open_o = 1'b1;
          else       state_d = M_WAIT;
        end
      end
      M_DIV: begin
        if (r_evt) begin
          close_o = 1'b1;
          if (d_evt) open_o = 1'b1;
          else       state_d = M_WAIT;
        end
      end
      default: state_d = M_WAIT;
    endcase
  end

  logic lead_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= M_WAIT;   // m_0 = 0
      lead_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_d == M_REF)      lead_q <= 1'b1;
      else if (state_d == M_DIV) lead_q <= 1'b0;
    end
  end

  assign state_o     = state_q;
  assign lead_ref_o  = lead_q;
  assign measuring_o = (state_q != M_WAIT);

endmodule
