// observe_outputs -- the two extra outputs used to observe the state.
//
// For the state <alpha, beta>, on the normal transition out of it:
//   a = 0 if alpha = 0, else 1
//   b = bit alpha of beta (0 when alpha >= K, where beta has no such bit)
// Watching a and b over 2M successive normal transitions identifies the
// state the machine started in: the positions where a = 0 give alpha, and the
// b bits give the bits of beta, some of them complemented by the carries of
// the intervening steps.
//
// Combinational.  In the counter these outputs depend on the state only;
// a machine with inputs would qualify them with the inputs that take the
// Hamiltonian-cycle transition.  Definitions of a and b follow the scheme;
// the value of b for alpha >= K is this design's choice.
module observe_outputs #(
  parameter int unsigned AW = 2,
  parameter int unsigned K  = 4
) (
  input  logic [AW-1:0] alpha,
  input  logic [K-1:0]  beta,
  output logic          obs_a,
  output logic          obs_b
);

  always_comb begin
    obs_a = (alpha != '0);
    obs_b = 1'b0;
    for (int unsigned i = 0; i < K; i++)
      if (32'(alpha) == i) obs_b = beta[i];
  end

endmodule
