// tb_updown_lfsr: self-checking test of the up-down LFSR address generator.
//
// Default instance (4 stages, x^4 + x + 1): from reset state 0 the up
// sequence must be 0,1,3,7,F,E,D,A,5,B,6,C,9,2,4,8 and back to 0 (worked
// out by hand from the state equations, the NOR term splicing in 0 after
// 8), one step per enabled clock; addr_nxt must announce each next state;
// en = 0 must hold the state; going down must replay the recorded
// sequence backwards, including at arbitrary direction changes. A second
// instance (5 stages, x^5 + x^2 + 1) must visit all 32 states and reverse
// exactly. A third instance is the general mixed-type LFSR (4 stages,
// x^4 + x + 1, inverted outputs D1 = D3 = 1, no zero-state splice): each
// up step must match the matrix equation Q(i+1) = Q(i) C + D and each
// down step Q(i+1) = Q(i) C' + D', evaluated here over GF(2) from the
// matrices; the cycle must have 15 distinct states and reverse exactly.
module tb_updown_lfsr;
  logic clk = 1'b0;
  logic rst_n;
  logic en, up_dn;
  logic [3:0] addr, addr_nxt;
  logic en5, up_dn5;
  logic [4:0] addr5, addr5_nxt;
  logic en_m, up_dn_m;
  logic [3:0] addr_m, addr_m_nxt;
  localparam logic [4:0] PM = 5'b1_0011;   // C0..C4
  localparam logic [3:0] DM = 4'b0101;     // DM[k-1] = Dk
  int checks = 0;
  int failures = 0;

  localparam logic [3:0] UP_SEQ [16] = '{4'h0, 4'h1, 4'h3, 4'h7, 4'hF, 4'hE, 4'hD, 4'hA,
                                         4'h5, 4'hB, 4'h6, 4'hC, 4'h9, 4'h2, 4'h4, 4'h8};

  always #5 clk = ~clk;

  updown_lfsr dut (.clk, .rst_n, .en, .up_dn, .addr, .addr_nxt);
  updown_lfsr #(.N(5), .POLY(6'b10_0101)) dut5 (
    .clk, .rst_n, .en(en5), .up_dn(up_dn5), .addr(addr5), .addr_nxt(addr5_nxt));
  updown_lfsr #(.N(4), .POLY(PM), .DINV(DM), .ZERO_FIX(1'b0)) dut_m (
    .clk, .rst_n, .en(en_m), .up_dn(up_dn_m), .addr(addr_m), .addr_nxt(addr_m_nxt));

  // Row vector times matrix plus vector over GF(2); index 0 is stage 1.
  function automatic logic [3:0] gf2_affine(input logic [3:0] q, input bit m [4][4],
                                            input logic [3:0] d);
    logic [3:0] r;
    for (int c = 0; c < 4; c++) begin
      r[c] = d[c];
      for (int k = 0; k < 4; k++) r[c] ^= q[k] & m[k][c];
    end
    return r;
  endfunction

  // Eq. (1.1): C has C1..Cn in its first column and ones above the diagonal.
  function automatic logic [3:0] eq_up(input logic [3:0] q);
    bit m [4][4];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = (c == 0) ? PM[r + 1] : (c == r + 1);
    return gf2_affine(q, m, DM);
  endfunction

  // Eq. (1.2): C' has Cn, C1..C(n-1) in its last column and ones below the
  // diagonal; D' = [D2 .. Dn, Cn*D1 + C1*D2 + ... + C(n-1)*Dn].
  function automatic logic [3:0] eq_down(input logic [3:0] q);
    bit m [4][4];
    logic [3:0] dp;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        m[r][c] = (c == 3) ? ((r == 0) ? PM[4] : PM[r]) : (r == c + 1);
    dp[2:0] = DM[3:1];
    dp[3] = PM[4] & DM[0];
    for (int k = 1; k < 4; k++) dp[3] ^= PM[k] & DM[k];
    return gf2_affine(q, m, dp);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int idx_of(input logic [3:0] a);
    for (int i = 0; i < 16; i++) if (UP_SEQ[i] == a) return i;
    return -1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos;
    logic [4:0] seen5 [32];
    bit [31:0] hit5;
    logic [3:0] seen_m [15];
    bit [15:0] hit_m;
    logic [3:0] prev_m;
    rst_n = 1'b0; en = 1'b0; up_dn = 1'b0; en5 = 1'b0; up_dn5 = 1'b0;
    en_m = 1'b0; up_dn_m = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(addr == 4'h0, "reset state 0");

    // Up through the whole cycle, one address per clock.
    en = 1'b1; up_dn = 1'b0;
    for (int i = 0; i < 16; i++) begin
      #1;
      check(addr == UP_SEQ[i], $sformatf("up step %0d: addr %h expected %h", i, addr, UP_SEQ[i]));
      check(addr_nxt == UP_SEQ[(i + 1) % 16], $sformatf("up step %0d: addr_nxt %h", i, addr_nxt));
      @(posedge clk);
    end
    #1 check(addr == 4'h0, "period is 16");

    // Hold.
    en = 1'b0;
    repeat (3) @(posedge clk);
    #1 check(addr == 4'h0, "en=0 holds");

    // Down through the whole cycle: exact reverse.
    en = 1'b1; up_dn = 1'b1;
    for (int i = 0; i < 16; i++) begin
      #1;
      check(addr == UP_SEQ[(16 - i) % 16], $sformatf("down step %0d: addr %h", i, addr));
      check(addr_nxt == UP_SEQ[(31 - i) % 16], $sformatf("down step %0d: addr_nxt %h", i, addr_nxt));
      @(posedge clk);
    end

    // Random walk: position in the known sequence must track +1 / -1.
    #1 pos = idx_of(addr);
    check(pos == 0, "back at 0 after 16 down steps");
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom_range(0, 3) != 0);
      up_dn = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (en) pos = up_dn ? (pos + 15) % 16 : (pos + 1) % 16;
      #1 check(addr == UP_SEQ[pos], $sformatf("random walk %0d: addr %h expected %h", i, addr, UP_SEQ[pos]));
    end
    en = 1'b0;

    // 5-stage generator: full 32-state cycle and exact reversal.
    hit5 = '0;
    en5 = 1'b1; up_dn5 = 1'b0;
    for (int i = 0; i < 32; i++) begin
      #1 seen5[i] = addr5;
      hit5[addr5] = 1'b1;
      @(posedge clk);
    end
    #1 check(hit5 == '1, "5 stages: all 32 addresses visited");
    check(addr5 == seen5[0], "5 stages: period 32");
    up_dn5 = 1'b1;
    for (int i = 0; i < 32; i++) begin
      @(posedge clk);
      #1 check(addr5 == seen5[(31 - i) % 32], $sformatf("5 stages: down step %0d", i));
    end
    en5 = 1'b0;

    // General mixed-type LFSR against the matrix equations.
    hit_m = '0;
    en_m = 1'b1; up_dn_m = 1'b0;
    for (int i = 0; i < 15; i++) begin
      #1 seen_m[i] = addr_m;
      hit_m[addr_m] = 1'b1;
      prev_m = addr_m;
      check(addr_m_nxt == eq_up(prev_m), $sformatf("MFSR up: addr_nxt %h expected %h", addr_m_nxt, eq_up(prev_m)));
      @(posedge clk);
      #1 check(addr_m == eq_up(prev_m), $sformatf("MFSR up step %0d: %h expected %h", i, addr_m, eq_up(prev_m)));
    end
    check($countones(hit_m) == 15, "MFSR: 15 distinct states");
    check(addr_m == seen_m[0], "MFSR: period 15");
    up_dn_m = 1'b1;
    for (int i = 0; i < 15; i++) begin
      #1 prev_m = addr_m;
      @(posedge clk);
      #1 check(addr_m == eq_down(prev_m), $sformatf("MFSR down step %0d: %h expected %h", i, addr_m, eq_down(prev_m)));
      check(addr_m == seen_m[(29 - i) % 15], $sformatf("MFSR down step %0d retraces the up sequence", i));
    end
    en_m = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
