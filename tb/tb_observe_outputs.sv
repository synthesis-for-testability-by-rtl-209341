// tb_observe_outputs -- checks the observation outputs a and b.
//
// Exhaustive over alpha and beta for K = 4 (AW = 2) and for K = 2 with
// AW = 2 (alpha = 2, 3 beyond K, where b must be 0): a is 1 unless alpha = 0,
// b is bit alpha of beta.  Also replays the worked sequence of the modulo-50
// counter from N(24) = <0, 1010>: the four normal transitions must emit
// b = 0, 1, 1, 0.
module tb_observe_outputs;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [1:0] a4;  logic [3:0] b4;  logic oa4, ob4;
  logic [1:0] a2;  logic [1:0] b2;  logic oa2, ob2;

  observe_outputs #(.AW(2), .K(4)) u4 (.alpha(a4), .beta(b4), .obs_a(oa4), .obs_b(ob4));
  observe_outputs #(.AW(2), .K(2)) u2 (.alpha(a2), .beta(b2), .obs_a(oa2), .obs_b(ob2));

  initial begin
    int seq_a[5] = '{0, 1, 2, 3, 0};
    int seq_b[5] = '{4'b1010, 4'b1011, 4'b1101, 4'b0001, 4'b1001};
    int want[4]  = '{0, 1, 1, 0};
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 16; b++) begin
        a4 = 2'(a); b4 = 4'(b);
        #1;
        check(oa4 == (a != 0) && ob4 == ((b >> a) & 1), $sformatf("K=4 <%0d,%0d>", a, b));
      end
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++) begin
        a2 = 2'(a); b2 = 2'(b);
        #1;
        check(oa2 == (a != 0) && ob2 == ((a < 2) ? ((b >> a) & 1) : 0),
              $sformatf("K=2 <%0d,%0d>", a, b));
      end
    for (int i = 0; i < 4; i++) begin
      a4 = 2'(seq_a[i]); b4 = 4'(seq_b[i]);
      #1;
      check(ob4 == 1'(want[i]), $sformatf("worked sequence output %0d", i));
    end
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
