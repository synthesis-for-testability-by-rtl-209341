// tb_split_next_state -- checks the split-code successor logic.
//
// Three instances: P = 50 (M = K = 4), P = 12 with M = 3, K = 2 (the twelve
// code words tabulated for that code, compared literally) and P = 10 (M = 3,
// K = 2, where alpha = 2 >= K leaves beta unchanged).  For every input code
// word, on the cycle or not, the output is compared with the definition
// <a+1 mod M, b + 2^a mod 2^K>, except that the last cycle state N(P-1) must
// go to <0,0>.  The reference is computed here from the definition.  The
// parameter rule of the package is also checked against the published table
// (p = 5, 10, 40, 1000 -> k = 2, 2, 4, 7 and m = 2, 3, 4, 8).
module tb_split_next_state;
  import split_code_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // instance A: P = 50, M = K = 4
  logic [1:0] a50, a50n;
  logic [3:0] b50, b50n;
  split_next_state #(.P(50)) u50 (.alpha(a50), .beta(b50), .alpha_next(a50n), .beta_next(b50n));

  // instance B: P = 12, M = 3, K = 2 (full code)
  logic [1:0] a12, a12n;
  logic [1:0] b12, b12n;
  split_next_state #(.P(12), .K(2), .M(3)) u12 (.alpha(a12), .beta(b12), .alpha_next(a12n), .beta_next(b12n));

  // instance C: P = 10, default M = 3, K = 2
  logic [1:0] a10, a10n;
  logic [1:0] b10, b10n;
  split_next_state #(.P(10)) u10 (.alpha(a10), .beta(b10), .alpha_next(a10n), .beta_next(b10n));

  // reference code word i of an (m, k) split code, by stepping the definition
  function automatic void ref_code(input int i, input int m, input int k,
                                   output int a, output int b);
    a = 0; b = 0;
    for (int j = 0; j < i; j++) begin
      b = (b + ((a < k) ? (1 << a) : 0)) % (1 << k);
      a = (a + 1) % m;
    end
  endfunction

  task automatic sweep50();
    int la, lb, ea, eb;
    ref_code(49, 4, 4, la, lb);
    check(la == 1 && lb == 5, "N(49) = <1,5>");
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 16; b++) begin
        a50 = 2'(a); b50 = 4'(b);
        #1;
        if (a == la && b == lb) begin ea = 0; eb = 0; end
        else begin ea = (a + 1) % 4; eb = (b + (1 << a)) % 16; end
        check(int'(a50n) == ea && int'(b50n) == eb,
              $sformatf("P=50 <%0d,%0d> -> <%0d,%0d>", a, b, a50n, b50n));
      end
  endtask

  task automatic sweep12();
    // the tabulated code for m = 3, k = 2, index 0..11
    int ta[12] = '{0, 1, 2, 0, 1, 2, 0, 1, 2, 0, 1, 2};
    int tb[12] = '{0, 1, 3, 3, 0, 2, 2, 3, 1, 1, 2, 0};
    for (int i = 0; i < 12; i++) begin
      a12 = 2'(ta[i]); b12 = 2'(tb[i]);
      #1;
      check(int'(a12n) == ta[(i + 1) % 12] && int'(b12n) == tb[(i + 1) % 12],
            $sformatf("P=12 N(%0d) successor", i));
    end
  endtask

  task automatic sweep10();
    int la, lb, ea, eb;
    ref_code(9, 3, 2, la, lb);
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 4; b++) begin
        a10 = 2'(a); b10 = 2'(b);
        #1;
        if (a == la && b == lb) begin ea = 0; eb = 0; end
        else begin ea = (a + 1) % 3; eb = (a < 2) ? (b + (1 << a)) % 4 : b; end
        check(int'(a10n) == ea && int'(b10n) == eb,
              $sformatf("P=10 <%0d,%0d> -> <%0d,%0d>", a, b, a10n, b10n));
      end
  endtask

  initial begin
    int pk[4] = '{5, 10, 40, 1000};
    int ek[4] = '{2, 2, 4, 7};
    int em[4] = '{2, 3, 4, 8};
    sweep50();
    sweep12();
    sweep10();
    foreach (pk[i])
      check(split_k(pk[i]) == ek[i] && split_m(pk[i]) == em[i],
            $sformatf("parameters for p=%0d", pk[i]));
    check(split_k(50) == 4 && split_m(50) == 4, "parameters for p=50");
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
