// tb_pfd_fsm: self-checking test of the PFD state machine.
//
// Drives random reference and divided strobes (including coincident ones and
// long runs of one kind) and compares state and strobes with a reference
// model that evaluates the state map m' = m/2 + sigma*(1 - m^2/2) in real
// arithmetic, one edge at a time. Coincident edges are applied as the closing
// edge first, then the opening edge; in the waiting state they give a
// zero-length measurement. The two-variable outputs (s, m_hat) are checked
// against the mapping (0,0)->0, (0,1)->-1, (1,1)->+1, with s kept while waiting.
`timescale 1ps / 1fs
module tb_pfd_fsm;
  import adpll_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, r_evt = 1'b0, d_evt = 1'b0;
  pfd_state_t state;
  logic open_s, close_s, close_pos, zero, lead_ref, measuring;
  int checks = 0, failures = 0;
  int n_open_r = 0, n_open_d = 0, n_close_r = 0, n_close_d = 0, n_zero = 0, n_run = 0;

  pfd_fsm dut (
    .clk(clk), .rst_n(rst_n), .r_evt(r_evt), .d_evt(d_evt), .state_o(state),
    .open_o(open_s), .close_o(close_s), .close_pos_o(close_pos), .zero_o(zero),
    .lead_ref_o(lead_ref), .measuring_o(measuring)
  );

  always #10 clk = ~clk;

  function automatic real step(real m, real sigma);
    return m / 2.0 + sigma * (1.0 - m * m / 2.0);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    real m, m1;
    int  e_open, e_close, e_pos, e_zero, mode, s_exp;
    m = 0.0; s_exp = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      mode = (i / 500) % 4;           // vary the mix: sparse, R-heavy, D-heavy, dense
      case (mode)
        0: begin r_evt = ($urandom_range(0, 9) == 0); d_evt = ($urandom_range(0, 9) == 0); end
        1: begin r_evt = ($urandom_range(0, 2) == 0); d_evt = ($urandom_range(0, 19) == 0); end
        2: begin r_evt = ($urandom_range(0, 19) == 0); d_evt = ($urandom_range(0, 2) == 0); end
        default: begin r_evt = $urandom_range(0, 1) == 1; d_evt = $urandom_range(0, 1) == 1; end
      endcase
      // expected strobes and next state
      e_open = 0; e_close = 0; e_pos = 0; e_zero = 0;
      m1 = m;
      if (r_evt && d_evt) begin
        if (m == 0.0) e_zero = 1;
        else begin
          e_close = 1; e_open = 1; e_pos = (m > 0.0);
          m1 = step(step(m, (m > 0.0) ? -1.0 : 1.0), (m > 0.0) ? 1.0 : -1.0);
        end
      end else if (r_evt || d_evt) begin
        m1 = step(m, r_evt ? 1.0 : -1.0);
        if (m == 0.0) e_open = 1;
        else if (m1 == 0.0) begin e_close = 1; e_pos = (m > 0.0); end
        else n_run++;
      end
      #1;
      check("state", int'($signed(state)), int'(m));
      check("open", int'(open_s), e_open);
      check("close", int'(close_s), e_close);
      if (e_close) check("close_pos", int'(close_pos), e_pos);
      check("zero", int'(zero), e_zero);
      // two-variable form: (s, m_hat) -> m is (0,0)->0, (1,0)->0, (0,1)->-1, (1,1)->+1
      check("m_hat", int'(measuring), int'(m != 0.0));
      check("s", int'(lead_ref), s_exp);
      if (e_open && m1 > 0.0) n_open_r++;
      if (e_open && m1 < 0.0) n_open_d++;
      if (e_close && e_pos) n_close_r++;
      if (e_close && !e_pos) n_close_d++;
      if (e_zero) n_zero++;
      if (m1 > 0.0) s_exp = 1;
      if (m1 < 0.0) s_exp = 0;
      m = m1;
    end
    @(negedge clk); r_evt = 0; d_evt = 0;
    #1 check("final state", int'($signed(state)), int'(m));
    // every transition of the state diagram must have been taken
    check("R-opened measurements seen", int'(n_open_r > 0), 1);
    check("D-opened measurements seen", int'(n_open_d > 0), 1);
    check("R-led closes seen", int'(n_close_r > 0), 1);
    check("D-led closes seen", int'(n_close_d > 0), 1);
    check("repeated edges seen", int'(n_run > 0), 1);
    check("coincident edges seen", int'(n_zero > 0), 1);
    $display("opens R=%0d D=%0d closes R=%0d D=%0d runs=%0d zero=%0d",
             n_open_r, n_open_d, n_close_r, n_close_d, n_run, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(20 * 30000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
