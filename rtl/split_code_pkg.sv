// split_code_pkg -- constants and elaboration-time helpers for the split
// coding system.
//
// A split code word <a, b> pairs a first component a in [m] with a second
// component b in [2^k].  The code sequence starts at N(0) = <0, 0> and steps
// N(j+1) = <a+1 mod m, b + 2^a mod 2^k>; the m*2^k words are all distinct.
// The states of a finite state machine are laid along a Hamiltonian cycle of
// its state graph and the i-th state of the cycle gets N(i).  The first
// component is held in the flip-flop group clocked by phi1, the second in the
// group clocked by phi2.
//
// The functions below are used only for parameter defaults and constants
// (they are evaluated at elaboration time):
//   split_k / split_m  pick the code parameters for p states: with
//                      n = ceil(log2 p), find t such that
//                      t-1+2^(t-1) < n <= t+2^t, then k = n-t and
//                      m = ceil(p / 2^k), raised to k where it would be
//                      smaller (the rule k <= m).  This reproduces the
//                      published parameter table (p = 5, 10, 40, 1000).
//   split_alpha_w      flip-flops in the first group, ceil(log2 m), at least 1.
//   split_alpha_of /   the two components of N(i), by stepping the
//   split_beta_of      definition i times.
package split_code_pkg;

  function automatic int unsigned clog2_min1(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((64'd1 << r) < 64'(v)) r++;
    return (r == 0) ? 1 : r;
  endfunction

  function automatic int unsigned split_k(input int unsigned p);
    int unsigned n, t;
    n = 0;
    while ((64'd1 << n) < 64'(p)) n++;
    // smallest t with n <= t + 2^t; the lower bound t-1+2^(t-1) < n then holds
    t = 0;
    while (64'(n) > 64'(t) + (64'd1 << t)) t++;
    return (n > t) ? (n - t) : 1;
  endfunction

  function automatic int unsigned split_m(input int unsigned p);
    int unsigned k, m;
    k = split_k(p);
    m = (p + (1 << k) - 1) >> k;
    return (m < k) ? k : m;
  endfunction

  function automatic int unsigned split_alpha_w(input int unsigned m);
    return clog2_min1(m);
  endfunction

  function automatic int unsigned split_alpha_of(input int unsigned i,
                                                 input int unsigned m);
    return i % m;
  endfunction

  function automatic int unsigned split_beta_of(input int unsigned i,
                                                input int unsigned m,
                                                input int unsigned k);
    longint unsigned b, mask;
    int unsigned a;
    mask = (64'd1 << k) - 1;
    a = 0;
    b = 0;
    for (int unsigned j = 0; j < i; j++) begin
      if (a < k) b = (b + (64'd1 << a)) & mask;
      a = (a + 1 == m) ? 0 : a + 1;
    end
    return int'(b);
  endfunction

  // Operating mode seen by the state flip-flops.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,  // both group clocks run
    MODE_PHI1   = 2'd1,  // only the first-component group is clocked
    MODE_PHI2   = 2'd2   // only the second-component group is clocked
  } clk_mode_e;

endpackage
