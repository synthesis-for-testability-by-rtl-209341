// split_counter_fsm -- modulo-P counter built for testability by two-clock
// control.
//
// The counter's P states form a Hamiltonian cycle S_0 -> S_1 -> ... -> S_{P-1}
// -> S_0.  State S_i is stored as the split code word N(i) = <alpha, beta>:
// alpha (AW flip-flops) is clocked by phi1, beta (K flip-flops) by phi2.
//
//   normal mode (test_mode = 0)            S_i -> S_{i+1} every clock
//   phi1 test mode (test_mode=1, sel=0)    <alpha_i, beta_i> -> <alpha_{i+1}, beta_i>
//   phi2 test mode (test_mode=1, sel=1)    <alpha_i, beta_i> -> <alpha_i, beta_{i+1}>
//
// Mixing the three lets a tester reach any state from any other within
// 4M-1 clocks (2M-1 when going to a lower index) without ever leaving the
// cycle, instead of up to P-1 clocks in normal mode alone.  The outputs obs_a
// and obs_b, watched over 2M normal clocks, identify the present state.
//
// Blocks: clock_control (pins -> phi1/phi2 or enables), split_next_state
// (cycle successor in split code), split_state_register (the two flip-flop
// groups) and observe_outputs (a, b).  CLOCK_GATING selects gated group
// clocks (1) or clock-enable muxes on clk (0); both behave the same.
//
// Timing: drive test_mode/test_sel while clk is low; the state changes after
// each rising edge of clk; rst_n is asynchronous and returns to S_0 = <0, 0>.
// Defaults are the modulo-50 counter with M = K = 4 used to illustrate the
// scheme.  The pin encoding, reset and the state outputs are this design's.
module split_counter_fsm
  import split_code_pkg::*;
#(
  parameter int unsigned P            = 50,
  parameter int unsigned K            = split_k(P),
  parameter int unsigned M            = split_m(P),
  parameter int unsigned AW           = split_alpha_w(M),
  parameter bit          CLOCK_GATING = 1'b1
) (
  input  logic          clk,
  input  logic          rst_n,      // asynchronous reset to S_0, active low
  input  logic          test_mode,  // 0: normal, 1: one group clocked
  input  logic          test_sel,   // test group: 0 = phi1 (alpha), 1 = phi2 (beta)
  output clk_mode_e     mode,       // decoded clocking mode
  output logic [AW-1:0] alpha,      // first component of the state code
  output logic [K-1:0]  beta,       // second component of the state code
  output logic          obs_a,      // observation output a
  output logic          obs_b       // observation output b
);

  logic en1, en2, phi1, phi2;
  logic [AW-1:0] alpha_next;
  logic [K-1:0]  beta_next;

  clock_control u_clock_control (
    .clk       (clk),
    .test_mode (test_mode),
    .test_sel  (test_sel),
    .mode      (mode),
    .en1       (en1),
    .en2       (en2),
    .phi1      (phi1),
    .phi2      (phi2)
  );

  split_next_state #(.P(P), .K(K), .M(M), .AW(AW)) u_next (
    .alpha      (alpha),
    .beta       (beta),
    .alpha_next (alpha_next),
    .beta_next  (beta_next)
  );

  split_state_register #(.AW(AW), .BW(K), .GATED(CLOCK_GATING)) u_state (
    .clk     (clk),
    .en1     (en1),
    .en2     (en2),
    .phi1    (phi1),
    .phi2    (phi2),
    .rst_n   (rst_n),
    .alpha_d (alpha_next),
    .beta_d  (beta_next),
    .alpha_q (alpha),
    .beta_q  (beta)
  );

  observe_outputs #(.AW(AW), .K(K)) u_observe (
    .alpha (alpha),
    .beta  (beta),
    .obs_a (obs_a),
    .obs_b (obs_b)
  );

  initial begin
    assert (P >= 2 && P <= M * (2 ** K))
      else $error("split_counter_fsm: P=%0d does not fit M*2^K=%0d", P, M * (2 ** K));
    assert (K <= 31) else $error("split_counter_fsm: K=%0d exceeds the 31-bit helpers", K);
  end

endmodule
