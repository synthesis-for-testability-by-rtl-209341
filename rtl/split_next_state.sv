// split_next_state -- next-state logic of a Hamiltonian cycle in split code.
//
// The P states of the cycle S_0 .. S_{P-1} are encoded with successive split
// code words, S_i = N(i) = <alpha, beta>, where alpha is in [M] and beta in
// [2^K].  The normal transition S_i -> S_{i+1} is therefore
//
//     <alpha, beta> -> <alpha+1 mod M, beta + 2^alpha mod 2^K>
//
// (2^alpha mod 2^K is 0 once alpha >= K, so then only alpha changes), except
// from the last state S_{P-1} = N(P-1), which returns to S_0 = <0, 0>.  With
// P < M*2^K the unused code words simply follow the same formula.
//
// Purely combinational.  The outputs feed both flip-flop groups; in a test
// mode only one group takes its part, which gives the extra test transitions
// <alpha_{j+1}, beta_j> and <alpha_j, beta_{j+1}> without extra logic.
// The code and its parameter rule follow the scheme; P defaults to 50 states
// (its modulo-50 counter example, M = K = 4).
module split_next_state
  import split_code_pkg::*;
#(
  parameter int unsigned P  = 50,
  parameter int unsigned K  = split_k(P),
  parameter int unsigned M  = split_m(P),
  parameter int unsigned AW = split_alpha_w(M)
) (
  input  logic [AW-1:0] alpha,       // present first component
  input  logic [K-1:0]  beta,        // present second component
  output logic [AW-1:0] alpha_next,  // next first component
  output logic [K-1:0]  beta_next    // next second component
);

  // code of the last state of the cycle, N(P-1)
  localparam logic [AW-1:0] LAST_ALPHA = AW'(split_alpha_of(P - 1, M));
  localparam logic [K-1:0]  LAST_BETA  = K'(split_beta_of(P - 1, M, K));

  logic [K-1:0] step;

  always_comb begin
    step = '0;
    for (int unsigned i = 0; i < K; i++)
      if (32'(alpha) == i) step[i] = 1'b1;   // 2^alpha mod 2^K

    if (alpha == LAST_ALPHA && beta == LAST_BETA) begin
      alpha_next = '0;
      beta_next  = '0;
    end else begin
      alpha_next = (32'(alpha) >= M - 1) ? '0 : alpha + 1'b1;
      beta_next  = beta + step;
    end
  end

endmodule
