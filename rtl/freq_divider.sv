// freq_divider: feedback frequency divider (/N) of the ADPLL.
//
// A modulo-N counter clocked by the DCO output. The divided clock rises when
// the counter wraps to 0 and falls half way through the count (at N/2), so one
// divided rising edge comes every N DCO periods, with a 50 % duty cycle for
// even N. N = 4 follows the chip's parameter table; the counter form is this
// design's choice. Reset is asynchronous, active low, and leaves the output low.
`timescale 1ps / 1fs
module freq_divider #(
  parameter int unsigned N = adpll_pkg::DIV_N_DEFAULT
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);

  localparam int unsigned W = (N > 1) ? $clog2(N) : 1;

  logic [W-1:0] cnt_q;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= W'(N - 1);
      clk_out <= 1'b0;
    end else begin
      cnt_q   <= (cnt_q == W'(N - 1)) ? '0 : cnt_q + W'(1);
      clk_out <= (cnt_q == W'(N - 1)) || (cnt_q + W'(1) < W'(N / 2));
    end
  end

endmodule
