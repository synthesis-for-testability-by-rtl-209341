// clock_control -- two-clock steering logic.
//
// The state flip-flops are split into two groups.  In normal mode both group
// clocks follow the system clock; in a test mode only one of them does, so
// only that group can change state.  Two test pins select the mode:
//
//   test_mode test_sel | phi1 phi2 | mode
//       0        x     |  clk  clk | normal
//       1        0     |  clk   0  | phi1 test mode (first component only)
//       1        1     |   0  clk  | phi2 test mode (second component only)
//
// Each group clock is gated by a latch-based clock-gating cell: the enable is
// captured by a latch that is transparent while clk is low and the clock is
// ANDed with the latched enable, so a pin change while clk is high cannot clip
// a pulse.  The latches are intentional (they are the gating cells) and are
// the only storage here.  For designs that prefer not to touch the clock tree,
// the raw enables en1/en2 are also brought out; feeding them to enable muxes in
// front of the flip-flops gives the same behaviour (see split_state_register).
//
// Timing: the pins must be stable around the rising edge of clk; a change made
// while clk is low takes effect on the next rising edge.  The clock gating and
// the mux alternative are as described for the scheme; the two-pin encoding
// and the latch-type gating cell are choices of this design.
module clock_control
  import split_code_pkg::*;
(
  input  logic      clk,
  input  logic      test_mode,  // 1: test mode, only one group clocked
  input  logic      test_sel,   // in test mode: 0 selects phi1, 1 selects phi2
  output clk_mode_e mode,       // decoded mode
  output logic      en1,        // clock enable of the first-component group
  output logic      en2,        // clock enable of the second-component group
  output logic      phi1,       // gated clock of the first-component group
  output logic      phi2        // gated clock of the second-component group
);

  logic en1_lat, en2_lat;

  always_comb begin
    if (!test_mode)     mode = MODE_NORMAL;
    else if (!test_sel) mode = MODE_PHI1;
    else                mode = MODE_PHI2;
  end

  assign en1 = (mode != MODE_PHI2);
  assign en2 = (mode != MODE_PHI1);

  // clock-gating latches, transparent while clk is low
  always_latch begin
    if (!clk) begin
      en1_lat = en1;
      en2_lat = en2;
    end
  end

  assign phi1 = clk & en1_lat;
  assign phi2 = clk & en2_lat;

endmodule
