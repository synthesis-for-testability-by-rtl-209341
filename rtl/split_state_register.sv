// split_state_register -- state flip-flops divided into two clock groups.
//
// The first component (alpha, AW bits) of the split-coded state sits in the
// group controlled by phi1, the second component (beta, BW bits) in the group
// controlled by phi2.  Two equivalent implementations are selectable:
//
//   GATED = 1  each group is clocked by its gated clock (phi1 / phi2 from
//              clock_control); clk, en1 and en2 are unused.
//   GATED = 0  both groups are clocked by clk and each flip-flop has a 2-input
//              mux that keeps its value when the group enable (en1 / en2) is
//              low.  This leaves the clock tree untouched.
//
// Both groups reset asynchronously (rst_n low) to ALPHA_RST / BETA_RST, the
// code of the reset state.  Outputs change after the rising clock edge of the
// enabled groups; a disabled group holds.  The grouping and both variants are
// as described for the scheme; the asynchronous reset is this design's choice.
// The inputs of the variant not selected are left unused.
module split_state_register #(
  parameter int unsigned AW        = 2,
  parameter int unsigned BW        = 4,
  parameter bit          GATED     = 1'b1,
  parameter logic [AW-1:0] ALPHA_RST = '0,
  parameter logic [BW-1:0] BETA_RST  = '0
) (
  input  logic          clk,      // system clock (GATED = 0)
  input  logic          en1,      // first-group enable (GATED = 0)
  input  logic          en2,      // second-group enable (GATED = 0)
  input  logic          phi1,     // first-group clock (GATED = 1)
  input  logic          phi2,     // second-group clock (GATED = 1)
  input  logic          rst_n,    // asynchronous reset, active low
  input  logic [AW-1:0] alpha_d,  // next first component
  input  logic [BW-1:0] beta_d,   // next second component
  output logic [AW-1:0] alpha_q,  // first component
  output logic [BW-1:0] beta_q    // second component
);

  if (GATED) begin : g_gated
    always_ff @(posedge phi1 or negedge rst_n) begin
      if (!rst_n) alpha_q <= ALPHA_RST;
      else        alpha_q <= alpha_d;
    end
    always_ff @(posedge phi2 or negedge rst_n) begin
      if (!rst_n) beta_q <= BETA_RST;
      else        beta_q <= beta_d;
    end
  end else begin : g_mux
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        alpha_q <= ALPHA_RST;
        beta_q  <= BETA_RST;
      end else begin
        alpha_q <= en1 ? alpha_d : alpha_q;
        beta_q  <= en2 ? beta_d  : beta_q;
      end
    end
  end

endmodule
