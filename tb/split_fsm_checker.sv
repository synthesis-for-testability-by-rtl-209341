// split_fsm_checker -- stimulus and self-checking for split_counter_fsm.
//
// Drives the clock, reset and test pins of one split_counter_fsm and checks
// every clock against a reference that it builds itself by stepping the
// split-code definition N(0) = <0,0>, N(j+1) = <a+1 mod M, b + 2^a mod 2^K>.
// It runs, in order:
//   1. reset and 2P normal clocks (cycle order, wrap S_{P-1} -> S_0, a/b outputs)
//   2. for P = 50, M = K = 4, the worked path N(0) -> N(49) in five clocks
//      (normal, phi1, normal, phi1, phi1), and the worked observation from
//      N(24) = <0,1010>: b = 0, 1, 1, 0, ending in <0,1001>
//   3. navigation: for NAV_PAIRS start/target pairs (0 = every pair) it finds
//      the shortest mix of normal / phi1 / phi2 clocks that stays on the cycle
//      (breadth-first search over the reference), checks its length against
//      the bounds 2M-1 (target index below start) and 4M-1 (above), applies
//      it and checks every state on the way
//   4. observation: from OBS_STARTS start states (0 = all) it records a, b
//      over 2M normal clocks and checks that exactly one state of the cycle
//      produces that record, the start state; where no wrap intervenes it also
//      checks alpha = (M - i) mod M, i the first clock with a = 0
//   5. an asynchronous reset in the middle of a test-mode sequence
// Counts of each mechanism are reported through ev_*; done rises at the end.
module split_fsm_checker
  import split_code_pkg::*;
#(
  parameter int unsigned P          = 50,
  parameter int unsigned K          = 4,
  parameter int unsigned M          = 4,
  parameter int unsigned AW         = 2,
  parameter int unsigned NAV_PAIRS  = 0,
  parameter int unsigned OBS_STARTS = 0
) (
  output logic          clk,
  output logic          rst_n,
  output logic          test_mode,
  output logic          test_sel,
  input  clk_mode_e     mode,
  input  logic [AW-1:0] alpha,
  input  logic [K-1:0]  beta,
  input  logic          obs_a,
  input  logic          obs_b,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            ev_normal,
  output int            ev_phi1,
  output int            ev_phi2,
  output int            ev_wrap,
  output int            ev_alpha_only,
  output int            ev_nav,
  output int            ev_obs,
  output int            ev_reset
);

  int unsigned ra[];         // reference first component of N(i)
  int unsigned rb[];         // reference second component of N(i)
  int          index_of[longint];
  int          cur;          // index of the present state in the model, -1 off-cycle
  int unsigned cur_a, cur_b; // model code of the present state

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic longint key(input int unsigned a, input int unsigned b);
    return longint'(a) * (longint'(1) << K) + longint'(b);
  endfunction

  function automatic int lookup(input int unsigned a, input int unsigned b);
    if (index_of.exists(key(a, b))) return index_of[key(a, b)];
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL %s (t=%0t) cur=%0d model=<%0d,%0d> dut=<%0d,%0d> ab=%b%b", what, $time, cur, cur_a, cur_b, alpha, beta, obs_a, obs_b);
    end
  endtask

  task automatic build_reference();
    int unsigned a, b;
    ra = new[M * (1 << K)];
    rb = new[M * (1 << K)];
    a = 0; b = 0;
    for (int i = 0; i < M * (1 << K); i++) begin
      ra[i] = a; rb[i] = b;
      check(!index_of.exists(key(a, b)), "split code words not distinct");
      if (i < P) index_of[key(a, b)] = i;
      if (a < K) b = (b + (1 << a)) % (1 << K);
      a = (a + 1) % M;
    end
  endtask

  function automatic int unsigned succ(input int i);
    return (i + 1) % P;
  endfunction

  // one clock in the given mode; the model follows and the DUT is compared
  task automatic step(input clk_mode_e md);
    int unsigned na, nb;
    int          nxt;
    bit          exp_a, exp_b;
    // called with clk low; returns at the following falling edge
    test_mode = (md != MODE_NORMAL);
    test_sel  = (md == MODE_PHI2);
    #1;
    check(mode == md, $sformatf("decoded mode %s got %s", md.name(), mode.name()));
    // Mealy outputs of the present state, computed from the model
    exp_a = (cur_a != 0);
    exp_b = (cur_a < K) ? ((cur_b >> cur_a) & 1) : 1'b0;
    check(obs_a == exp_a && obs_b == exp_b, "observation outputs a/b");
    // the next code word: cycle successor, or off-cycle formula
    if (cur >= 0) begin
      na = ra[succ(cur)]; nb = rb[succ(cur)];
    end else begin
      na = (cur_a + 1) % M;
      nb = (cur_a < K) ? (cur_b + (1 << cur_a)) % (1 << K) : cur_b;
    end
    case (md)
      MODE_NORMAL: begin
        ev_normal++;
        if (cur == int'(P) - 1) ev_wrap++;
        if (nb == cur_b && cur_a >= K) ev_alpha_only++;
      end
      MODE_PHI1: begin ev_phi1++; nb = cur_b; end
      default:   begin ev_phi2++; na = cur_a; end
    endcase
    @(posedge clk);
    #1;
    cur_a = na; cur_b = nb;
    nxt = lookup(na, nb);
    cur = nxt;
    check(32'(alpha) == na && 32'(beta) == nb, $sformatf("state after %s", md.name()));
    @(negedge clk);
  endtask

  // called with clk low, pulses rst_n within the low phase
  task automatic do_reset();
    rst_n = 1'b0;
    #2;
    check(alpha == '0 && beta == '0, "asynchronous reset to N(0)");
    #1;
    rst_n = 1'b1;
    test_mode = 1'b0;
    cur = 0; cur_a = 0; cur_b = 0;
    ev_reset++;
  endtask

  // shortest on-cycle path from r to s; returns the modes in mseq
  task automatic find_path(input int r, input int s, output clk_mode_e mseq[$]);
    int        hops[];
    int        prv[];
    clk_mode_e pmd[];
    int        q[$];
    int        u, v;
    clk_mode_e md;
    hops = new[P]; prv = new[P]; pmd = new[P];
    foreach (hops[i]) hops[i] = -1;
    hops[r] = 0;
    q.push_back(r);
    while (q.size() > 0) begin
      u = q.pop_front();
      for (int c = 0; c < 3; c++) begin
        md = clk_mode_e'(c);
        case (md)
          MODE_NORMAL: v = int'(succ(u));
          MODE_PHI1:   v = lookup(ra[succ(u)], rb[u]);
          default:     v = lookup(ra[u], rb[succ(u)]);
        endcase
        if (v >= 0 && hops[v] < 0) begin
          hops[v] = hops[u] + 1; prv[v] = u; pmd[v] = md;
          q.push_back(v);
        end
      end
    end
    mseq.delete();
    if (hops[s] < 0) return;
    v = s;
    while (v != r) begin
      mseq.push_front(pmd[v]);
      v = prv[v];
    end
  endtask

  task automatic navigate(input int s, input bit count_bound);
    clk_mode_e mseq[$];
    int        r;
    r = cur;
    if (r == s) return;
    find_path(r, s, mseq);
    check(mseq.size() > 0, "target reachable on the cycle");
    if (count_bound)
      check(mseq.size() <= ((r > s) ? 2 * M - 1 : 4 * M - 1),
            $sformatf("navigation %0d->%0d took %0d clocks", r, s, mseq.size()));
    foreach (mseq[i]) begin
      step(mseq[i]);
      check(cur >= 0, "navigation stayed on the cycle");
    end
    check(cur == s, "navigation reached its target");
    ev_nav++;
  endtask

  task automatic observe(input int r);
    bit obs_seen[$];
    int n_match, match, ia;
    bit ok, wraps;
    navigate(r, 1'b0);
    obs_seen.delete();
    wraps = 1'b0;
    for (int t = 0; t < 2 * M; t++) begin
      if (cur == int'(P) - 1) wraps = 1'b1;
      obs_seen.push_back(obs_a);
      obs_seen.push_back(obs_b);
      step(MODE_NORMAL);
    end
    // which cycle states would have produced this record?
    n_match = 0; match = -1;
    for (int i = 0; i < int'(P); i++) begin
      ok = 1'b1;
      for (int t = 0; t < 2 * M; t++) begin
        int j;
        j = (i + t) % P;
        if (obs_seen[2*t]   != (ra[j] != 0)) ok = 1'b0;
        if (obs_seen[2*t+1] != ((ra[j] < K) ? ((rb[j] >> ra[j]) & 1) : 0)) ok = 1'b0;
      end
      if (ok) begin n_match++; match = i; end
    end
    check(n_match == 1 && match == r, $sformatf("state %0d identified from a/b", r));
    if (!wraps) begin
      ia = -1;
      for (int t = int'(M) - 1; t >= 0; t--) if (!obs_seen[2*t]) ia = t;
      check(ia >= 0 && ((M - ia) % M) == ra[r], "alpha from the first a = 0");
    end
    ev_obs++;
  endtask

  initial begin
    clk_mode_e seq[$];
    int        n, r, s;
    done = 0; checks = 0; failures = 0;
    ev_normal = 0; ev_phi1 = 0; ev_phi2 = 0; ev_wrap = 0; ev_alpha_only = 0;
    ev_nav = 0; ev_obs = 0; ev_reset = 0;
    rst_n = 1'b0; test_mode = 1'b0; test_sel = 1'b0;
    build_reference();
    repeat (2) @(posedge clk);
    @(negedge clk);
    do_reset();

    // 1. the cycle in normal mode
    for (int i = 0; i < 2 * int'(P); i++) step(MODE_NORMAL);
    check(cur == 0, "back at S_0 after 2P normal clocks");

    // 2. the worked five-clock path N(0) -> N(49)
    if (P == 50 && M == 4 && K == 4) begin
      do_reset();
      seq = '{MODE_NORMAL, MODE_PHI1, MODE_NORMAL, MODE_PHI1, MODE_PHI1};
      foreach (seq[i]) step(seq[i]);
      check(alpha == 2'(1) && beta == 4'(5) && cur == 49, "N(0) to N(49) = <1,5> in 5 clocks");
      // the worked observation from N(24) = <0, 1010>: b = 0, 1, 1, 0
      navigate(24, 1'b0);
      check(alpha == 2'(0) && beta == 4'b1010, "N(24) = <0,1010>");
      for (int i = 0; i < 4; i++) begin
        check(obs_b == 1'(32'h6 >> i), $sformatf("worked observation bit %0d", i));
        step(MODE_NORMAL);
      end
      check(alpha == 2'(0) && beta == 4'b1001, "N(28) = <0,1001>");
    end

    // 3. navigation between pairs of states
    if (NAV_PAIRS == 0) begin
      for (r = 0; r < int'(P); r++)
        for (s = 0; s < int'(P); s++)
          if (r != s) begin navigate(r, 1'b0); navigate(s, 1'b1); end
    end else begin
      for (n = 0; n < int'(NAV_PAIRS); n++) begin
        r = $urandom_range(P - 1);
        s = $urandom_range(P - 1);
        navigate(r, 1'b0);
        navigate(s, 1'b1);
      end
    end

    // 4. state observation
    if (OBS_STARTS == 0) begin
      for (r = 0; r < int'(P); r++) observe(r);
    end else begin
      for (n = 0; n < int'(OBS_STARTS); n++) observe($urandom_range(P - 1));
    end

    // 5. reset in the middle of test-mode clocks
    step(MODE_PHI1); step(MODE_PHI2); step(MODE_PHI2);
    do_reset();
    step(MODE_NORMAL);
    check(cur == 1, "counting resumes after reset");
    done = 1;
  end

endmodule
