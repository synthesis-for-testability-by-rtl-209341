// tb_split_counter_fsm_variants -- split_counter_fsm in other configurations.
//
//   u_mux   P = 50 with clock-enable muxes instead of gated clocks
//           (CLOCK_GATING = 0); every pair navigated, every state observed
//   u_p5    P = 5 (M = K = 2), the smallest entry of the parameter table
//   u_p10   P = 10 (M = 3, K = 2): a code with alpha >= K, where a normal
//           transition changes only the first component
//   u_p40   P = 40 (M = K = 4): the rule k <= m raises m from 3 to 4
//   u_p1000 P = 1000 (M = 8, K = 7), the largest entry of the parameter
//           table; 300 random navigations and 100 random observations
// The three run concurrently; each mechanism must occur in every instance
// where it can.
module tb_split_counter_fsm_variants;
  import split_code_pkg::*;

  int total_checks, total_fail;

  `define SPLIT_VARIANT(NAME, PV, CG, NAV, OBS)                                     \
  localparam int unsigned NAME``_K  = split_k(PV);                                  \
  localparam int unsigned NAME``_M  = split_m(PV);                                  \
  localparam int unsigned NAME``_AW = split_alpha_w(NAME``_M);                      \
  logic NAME``_clk, NAME``_rst_n, NAME``_tm, NAME``_ts, NAME``_a, NAME``_b;         \
  logic NAME``_done;                                                                \
  clk_mode_e NAME``_mode;                                                           \
  logic [NAME``_AW-1:0] NAME``_alpha;                                               \
  logic [NAME``_K-1:0]  NAME``_beta;                                                \
  int NAME``_checks, NAME``_fail, NAME``_ev[8];                                     \
  split_counter_fsm #(.P(PV), .CLOCK_GATING(CG)) u_``NAME (                         \
    .clk(NAME``_clk), .rst_n(NAME``_rst_n), .test_mode(NAME``_tm),                  \
    .test_sel(NAME``_ts), .mode(NAME``_mode), .alpha(NAME``_alpha),                 \
    .beta(NAME``_beta), .obs_a(NAME``_a), .obs_b(NAME``_b));                        \
  split_fsm_checker #(.P(PV), .K(NAME``_K), .M(NAME``_M), .AW(NAME``_AW),           \
                      .NAV_PAIRS(NAV), .OBS_STARTS(OBS)) c_``NAME (                 \
    .clk(NAME``_clk), .rst_n(NAME``_rst_n), .test_mode(NAME``_tm),                  \
    .test_sel(NAME``_ts), .mode(NAME``_mode), .alpha(NAME``_alpha),                 \
    .beta(NAME``_beta), .obs_a(NAME``_a), .obs_b(NAME``_b), .done(NAME``_done),     \
    .checks(NAME``_checks), .failures(NAME``_fail), .ev_normal(NAME``_ev[0]),       \
    .ev_phi1(NAME``_ev[1]), .ev_phi2(NAME``_ev[2]), .ev_wrap(NAME``_ev[3]),         \
    .ev_alpha_only(NAME``_ev[4]), .ev_nav(NAME``_ev[5]), .ev_obs(NAME``_ev[6]),     \
    .ev_reset(NAME``_ev[7]));

  `SPLIT_VARIANT(mux,   50,   1'b0, 0,   0)
  `SPLIT_VARIANT(p5,    5,    1'b1, 0,   0)
  `SPLIT_VARIANT(p10,   10,   1'b1, 0,   0)
  `SPLIT_VARIANT(p40,   40,   1'b1, 0,   0)
  `SPLIT_VARIANT(p1000, 1000, 1'b1, 300, 100)

  task automatic report(input string name, input int ev[8], input int c, input int f,
                        input bit need_alpha_only);
    string evn[8] = '{"normal", "phi1", "phi2", "wrap", "alpha-only", "navigation",
                      "identification", "reset"};
    total_checks += c + 8;
    total_fail   += f;
    for (int i = 0; i < 8; i++) begin
      $display("  %-6s %-15s %0d", name, evn[i], ev[i]);
      if (ev[i] == 0 && (i != 4 || need_alpha_only)) begin
        total_fail++;
        $display("FAIL %s: %s never happened", name, evn[i]);
      end
    end
  endtask

  initial begin
    total_checks = 0; total_fail = 0;
    wait (mux_done && p5_done && p10_done && p40_done && p1000_done);
    report("mux",   mux_ev,   mux_checks,   mux_fail,   1'b0);
    report("p5",    p5_ev,    p5_checks,    p5_fail,    1'b0);
    report("p10",   p10_ev,   p10_checks,   p10_fail,   1'b1);
    report("p40",   p40_ev,   p40_checks,   p40_fail,   1'b0);
    report("p1000", p1000_ev, p1000_checks, p1000_fail, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_fail);
    $finish;
  end

  initial begin
    #50ms;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks + 1, total_fail + 1);
    $finish;
  end

endmodule
