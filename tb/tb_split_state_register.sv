// tb_split_state_register -- checks the two-group state register.
//
// Both variants (GATED = 1 with gated group clocks, GATED = 0 with enable
// muxes) hold a 3-bit modulo-8 binary counter whose leftmost bit is the first
// group and the other two bits the second group.  Random clock modes are
// applied; the expected state is, from state s with s' = s + 1 mod 8:
//   normal -> s',  phi1 only -> {s'[2], s[1:0]},  phi2 only -> {s[2], s'[1:0]}
// e.g. from 011: 100 normally, 111 in phi1 mode and 000 in phi2 mode.
// Asynchronous reset to 000 is checked at the start and mid-run.
module tb_split_state_register;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic clk = 1'b0, rst_n, en1, en2;
  logic phi1, phi2;
  logic       ag_q, am_q;
  logic [1:0] bg_q, bm_q;
  logic [2:0] g_next, m_next;

  always #5 clk = ~clk;
  // gated clocks, enables changed only while clk is low
  assign phi1 = clk & en1;
  assign phi2 = clk & en2;

  assign g_next = {ag_q, bg_q} + 3'd1;
  assign m_next = {am_q, bm_q} + 3'd1;

  split_state_register #(.AW(1), .BW(2), .GATED(1'b1)) u_gated (
    .clk(1'b0), .en1(1'b0), .en2(1'b0), .phi1, .phi2, .rst_n,
    .alpha_d(g_next[2]), .beta_d(g_next[1:0]), .alpha_q(ag_q), .beta_q(bg_q));

  split_state_register #(.AW(1), .BW(2), .GATED(1'b0)) u_mux (
    .clk, .en1, .en2, .phi1(1'b0), .phi2(1'b0), .rst_n,
    .alpha_d(m_next[2]), .beta_d(m_next[1:0]), .alpha_q(am_q), .beta_q(bm_q));

  logic [2:0] s;
  int seen_011[3];

  task automatic clock(input int md);   // 0 normal, 1 phi1, 2 phi2
    logic [2:0] n, e;
    // entered with clk low, returns at the next falling edge
    en1 = (md != 2); en2 = (md != 1);
    n = s + 3'd1;
    case (md)
      0: e = n;
      1: e = {n[2], s[1:0]};
      default: e = {s[2], n[1:0]};
    endcase
    if (s == 3'b011) seen_011[md]++;
    @(posedge clk);
    #1;
    check({ag_q, bg_q} == e, $sformatf("gated %b mode %0d -> %b", s, md, {ag_q, bg_q}));
    check({am_q, bm_q} == e, $sformatf("mux %b mode %0d -> %b", s, md, {am_q, bm_q}));
    if (s == 3'b011)
      check(e == ((md == 0) ? 3'b100 : (md == 1) ? 3'b111 : 3'b000), "transitions from 011");
    s = e;
    @(negedge clk);
  endtask

  task automatic reset();   // within a low phase of clk
    rst_n = 1'b0;
    #1;
    check({ag_q, bg_q} == 3'b000 && {am_q, bm_q} == 3'b000, "asynchronous reset");
    #1;
    rst_n = 1'b1;
    s = 3'b000;
  endtask

  initial begin
    en1 = 1'b1; en2 = 1'b1; rst_n = 1'b1;
    @(negedge clk);
    reset();
    repeat (400) clock($urandom_range(2));
    reset();
    // reach 011 and take each of its three exits
    for (int md = 0; md < 3; md++) begin
      repeat (3) clock(0);
      clock(md);
      reset();
    end
    check(seen_011[0] > 0 && seen_011[1] > 0 && seen_011[2] > 0, "all exits of 011 taken");
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
