// edge_sync: brings an external clock into the time-base domain as a strobe.
//
// Two flip-flops resynchronise the input; a third stage detects the rising
// edge and emits a one-cycle strobe. The reference and the divided clocks go
// through identical copies, so both see the same two-to-three cycle latency
// and the measured time difference is not biased. This sampling stage is part
// of this design's counter-based TDC and is not part of the source description.
`timescale 1ps / 1fs
module edge_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic sig_i,
  output logic rise_o
);

  logic [2:0] sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh_q <= '0;
    else        sh_q <= {sh_q[1:0], sig_i};
  end

  assign rise_o = sh_q[1] & ~sh_q[2];

endmodule
