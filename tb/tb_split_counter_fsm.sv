// tb_split_counter_fsm -- end-to-end test of the split-coded modulo-50
// counter with two-clock control, at its default parameters (P = 50,
// M = K = 4, gated group clocks).
//
// split_fsm_checker drives the pins and checks every clock: the whole cycle
// in normal mode with the wrap back to S_0, the five-clock path N(0) -> N(49)
// and the worked observation from N(24),
// navigation between every ordered pair of states within the 2M-1 / 4M-1
// clock bounds using normal, phi1-only and phi2-only clocks, identification of
// every state from the a/b outputs over 2M clocks, and asynchronous reset.
// Each mechanism must occur at least once.
module tb_split_counter_fsm;
  import split_code_pkg::*;

  localparam int unsigned P  = 50;
  localparam int unsigned K  = split_k(P);
  localparam int unsigned M  = split_m(P);
  localparam int unsigned AW = split_alpha_w(M);

  logic clk, rst_n, test_mode, test_sel, obs_a, obs_b, done;
  clk_mode_e mode;
  logic [AW-1:0] alpha;
  logic [K-1:0]  beta;
  int checks, failures, ev_normal, ev_phi1, ev_phi2, ev_wrap, ev_alpha_only;
  int ev_nav, ev_obs, ev_reset;
  int extra_fail;

  split_counter_fsm dut (
    .clk, .rst_n, .test_mode, .test_sel, .mode, .alpha, .beta, .obs_a, .obs_b
  );

  split_fsm_checker #(.P(P), .K(K), .M(M), .AW(AW)) chk (.*);

  task automatic need(input int count, input string what);
    $display("  %-28s %0d", what, count);
    if (count == 0) begin
      extra_fail++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    extra_fail = 0;
    wait (done);
    need(ev_normal, "normal clocks");
    need(ev_phi1,   "phi1-only test clocks");
    need(ev_phi2,   "phi2-only test clocks");
    need(ev_wrap,   "wraps S_{P-1} -> S_0");
    need(ev_nav,    "navigations");
    need(ev_obs,    "state identifications");
    need(ev_reset,  "resets");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 7, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
