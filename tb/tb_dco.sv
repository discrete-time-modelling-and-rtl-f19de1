// tb_dco: self-checking test of the behavioural DCO model.
//
// With jitter off, measures the output period over many cycles for several
// codes and checks f = 540 MHz + 624 kHz * code to 0.01 %. With jitter on
// (1 % per period), checks that the mean period is unchanged to 0.2 % and
// that the spread is between 0.7 % and 1.3 %. Also checks that the output
// stays low while disabled.
`timescale 1ps / 1fs
module tb_dco;
  logic       en = 1'b0;
  logic [7:0] code = '0;
  logic       clk0, clkj;
  int checks = 0, failures = 0;

  dco #(.JITTER_REL(0.0))  u_ideal  (.enable(en), .code(code), .clk_out(clk0));
  dco #(.JITTER_REL(0.01)) u_jitter (.enable(en), .code(code), .clk_out(clkj));

  task automatic check_real(string what, real got, real lo, real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %f outside [%f, %f]", what, got, lo, hi);
    end
  endtask

  task automatic measure_ideal(int c);
    realtime t0, t1;
    real f, fexp;
    code = 8'(c);
    repeat (3) @(posedge clk0);
    t0 = $realtime;
    repeat (1000) @(posedge clk0);
    t1 = $realtime;
    f = 1000.0 / ((t1 - t0) * 1.0e-12);
    fexp = 540.0e6 + 624.0e3 * real'(c);
    check_real($sformatf("frequency at code %0d (MHz)", c), f / 1.0e6,
               fexp / 1.0e6 * 0.9999, fexp / 1.0e6 * 1.0001);
  endtask

  initial begin
    realtime tp, tn;
    real s, s2, p, mean, sd, pexp;
    #5000;
    checks++;
    if (clk0 !== 1'b0) begin failures++; $display("FAIL output active while disabled"); end
    en = 1'b1;
    measure_ideal(0);
    measure_ideal(51);
    measure_ideal(128);
    measure_ideal(205);
    measure_ideal(255);
    code = 8'd100;
    pexp = 1.0e12 / (540.0e6 + 624.0e3 * 100.0);
    repeat (3) @(posedge clkj);
    tp = $realtime; s = 0.0; s2 = 0.0;
    for (int i = 0; i < 4000; i++) begin
      @(posedge clkj);
      tn = $realtime;
      p = tn - tp; tp = tn;
      s += p; s2 += p * p;
    end
    mean = s / 4000.0;
    sd = $sqrt(s2 / 4000.0 - mean * mean);
    check_real("jittered mean period (ps)", mean, pexp * 0.998, pexp * 1.002);
    check_real("jittered relative spread", sd / pexp, 0.007, 0.013);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
