// tb_clock_control -- checks the two-clock steering logic.
//
// For each pin setting (normal, phi1 test, phi2 test) it counts the pulses on
// phi1 and phi2 over 16 clocks: 16/16 in normal mode, 16/0 and 0/16 in the
// test modes, and checks the decoded mode and the enables.  Pins are also
// changed while clk is high: the change may only act from the next clock,
// and every edge of phi1/phi2 must fall on an edge of clk (no clipped or
// extra pulses).
module tb_clock_control;
  import split_code_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic clk = 1'b0, test_mode, test_sel, en1, en2, phi1, phi2;
  clk_mode_e mode;
  int n1, n2;
  time t_rise, t_fall;

  clock_control dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) t_rise = $time;
  always @(negedge clk) t_fall = $time;

  always @(posedge phi1) begin n1++; #0 check(clk && $time == t_rise, "phi1 rises with clk"); end
  always @(posedge phi2) begin n2++; #0 check(clk && $time == t_rise, "phi2 rises with clk"); end
  always @(negedge phi1) if ($time > 0) begin #0 check(!clk && $time == t_fall, "phi1 falls with clk"); end
  always @(negedge phi2) if ($time > 0) begin #0 check(!clk && $time == t_fall, "phi2 falls with clk"); end

  task automatic run(input logic tm, input logic ts, input clk_mode_e md,
                     input int w1, input int w2);
    @(negedge clk);
    test_mode = tm; test_sel = ts;
    #1;
    check(mode == md, $sformatf("mode %s", md.name()));
    check(en1 == (w1 != 0) && en2 == (w2 != 0), "enables");
    n1 = 0; n2 = 0;
    repeat (16) @(negedge clk);
    check(n1 == w1 && n2 == w2, $sformatf("%s pulses %0d/%0d", md.name(), n1, n2));
  endtask

  initial begin
    n1 = 0; n2 = 0;
    test_mode = 1'b0; test_sel = 1'b0;
    repeat (2) @(posedge clk);
    run(1'b0, 1'b0, MODE_NORMAL, 16, 16);
    run(1'b1, 1'b0, MODE_PHI1, 16, 0);
    run(1'b1, 1'b1, MODE_PHI2, 0, 16);
    run(1'b0, 1'b1, MODE_NORMAL, 16, 16);
    // pin change while clk is high acts from the next rising edge
    @(posedge clk);
    #2;
    n1 = 0; n2 = 0;
    test_mode = 1'b1; test_sel = 1'b0;
    @(negedge clk);
    #1;
    check(n1 == 0 && n2 == 0, "no pulse from a change while clk high");
    repeat (4) @(negedge clk);
    check(n1 == 4 && n2 == 0, $sformatf("phi1 only after change: %0d/%0d", n1, n2));
    @(posedge clk);
    #2;
    n1 = 0; n2 = 0;
    test_sel = 1'b1;
    repeat (4) @(negedge clk);   // the first falling edge precedes the next rise
    check(n1 == 0 && n2 == 3, $sformatf("phi2 only after change: %0d/%0d", n1, n2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
