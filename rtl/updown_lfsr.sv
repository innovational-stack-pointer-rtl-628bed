// updown_lfsr: up-down address generator built from an LFSR.
//
// A counter that must count both up and down is replaced by an N-stage
// linear feedback shift register that can run its state sequence forwards
// or backwards. Going up (up_dn = 0) it is the external-type mixed LFSR
// with characteristic polynomial P(x) = C0 + C1 x + ... + CN x^N, shifting
// from stage 1 towards stage N (state equation Q(i+1) = Q(i) C + D):
//     Q1' = C1*Q1 ^ C2*Q2 ^ ... ^ CN*QN ^ D1 ^ z,   Qk' = Q(k-1) ^ Dk
// Going down (up_dn = 1) the same flip-flops shift the other way and the
// feedback uses the reciprocal polynomial, seen from the other end
// (Q(i+1) = Q(i) C' + D'):
//     QN' = CN*(Q1^D1) ^ C1*(Q2^D2) ^ ... ^ C(N-1)*(QN^DN) ^ z,
//     Qk' = Q(k+1) ^ D(k+1)
// With CN = 1 the matrices satisfy C C' = I and D C' = D', so one step
// down exactly undoes one step up: the address sequence reverses whenever
// up_dn flips. Di = 1 selects the inverted register output (Q-bar) on the
// ring segment in front of stage i.
//
// A primitive P(x) gives 2^N - 1 states. With ZERO_FIX = 1 (the default,
// which needs all Di = 0) a NOR term z splices the missing all-zero state
// into the cycle so that all 2^N addresses are used: going up
// z = NOR(Q1..Q(N-1)), going down z = NOR(Q2..QN), a single NOR gate
// whose one end input is switched with the direction.
//
// Structure: the flip-flops are N reversible registers (rev_reg) in a
// ring. The ring wire from stage N back to stage 1 carries, in order, N-1
// one-way XORs active going down (taps of the reciprocal polynomial, side
// input Q(k+1)^D(k+1)), one reversible XOR that adds z in both
// directions, and N-1 one-way XORs active going up (taps of P(x), side
// input Qk). Taps whose coefficient is 0 get a side input of 0. Each ring
// segment is a pair of one-way wires, one per direction, in place of the
// tri-state bus of the original circuit.
//
// The example of the document (4 stages, x^4 + x + 1 up, x^4 + x^3 + 1
// down, no inversions, NOR gate for the zero state) is the default. The
// NOR inputs, the order of the gates on the ring wire and the reset state
// are this design's own choices.
//
// Interface and timing: when en = 1 the register takes one step in the
// direction given by up_dn at the rising clk edge. addr[k-1] is stage Qk.
// addr_nxt is the address the next enabled step will produce in the
// present direction (combinational from addr and up_dn). rst_n resets
// asynchronously to INIT, which must lie on the cycle (with inversions
// and no zero splice, INIT must not be the one state left out).
module updown_lfsr #(
  parameter int unsigned N    = stack_pkg::LFSR_STAGES,
  parameter logic [N:0]  POLY = stack_pkg::LFSR_POLY,   // bit i = coefficient of x^i
  parameter logic [N-1:0] DINV = '0,     // DINV[k-1] = Dk, 1: inverted output
  parameter bit           ZERO_FIX = 1'b1,
  parameter logic [N-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         up_dn,    // 0: up (normal polynomial), 1: down (reciprocal)
  output logic [N-1:0] addr,
  output logic [N-1:0] addr_nxt
);
  localparam int unsigned M = 3 * N - 1;   // parts on the ring

  if (N < 2) begin : g_check_n
    $error("updown_lfsr needs at least 2 stages");
  end
  if (!POLY[0] || !POLY[N]) begin : g_check_poly
    $error("updown_lfsr needs C0 = CN = 1");
  end
  if (ZERO_FIX && DINV != '0) begin : g_check_fix
    $error("updown_lfsr: the NOR zero-state splice needs all Di = 0");
  end

  // fw[m]: output of ring part m towards part m+1 (used when up_dn = 0)
  // bw[m]: output of ring part m towards part m-1 (used when up_dn = 1)
  logic [M-1:0] fw, bw;
  logic         zero_fix;
  logic [N-2:0] nor_in;

  // The NOR term: the N-1 stages that survive the shift must all be 0.
  assign nor_in   = up_dn ? addr[N-1:1] : addr[N-2:0];
  assign zero_fix = ZERO_FIX & ~|nor_in;

  for (genvar m = 0; m < M; m++) begin : g_ring
    localparam int unsigned PREV = (m + M - 1) % M;
    localparam int unsigned NEXT = (m + 1) % M;

    if (m < N) begin : g_stage
      // stage Q(m+1)
      rev_reg #(.RESET_VAL(INIT[m]), .D_INV(DINV[m])) u_reg (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (en),
        .up_dn (up_dn),
        .l_in  (fw[PREV]),
        .r_in  (bw[NEXT]),
        .l_out (bw[m]),
        .r_out (fw[m]),
        .d     (addr_nxt[m]),
        .q     (addr[m])
      );
    end else if (m < 2 * N - 1) begin : g_down_tap
      // tap of the reciprocal polynomial: coefficient C(k) on Q(k+1)^D(k+1)
      localparam int unsigned K = 2 * N - 1 - m;   // N-1 down to 1
      oneway_xor #(.XOR_WHEN(stack_pkg::DIR_DOWN)) u_xor (
        .up_dn (up_dn),
        .l_in  (fw[PREV]),
        .r_in  (bw[NEXT]),
        .side  (POLY[K] & (addr[K] ^ DINV[K])),
        .l_out (bw[m]),
        .r_out (fw[m])
      );
    end else if (m == 2 * N - 1) begin : g_zero
      rev_xor u_xor (
        .up_dn (up_dn),
        .l_in  (fw[PREV]),
        .r_in  (bw[NEXT]),
        .side  (zero_fix),
        .l_out (bw[m]),
        .r_out (fw[m])
      );
    end else begin : g_up_tap
      // tap of the normal polynomial: coefficient C(k) on stage Q(k)
      localparam int unsigned K = m - 2 * N + 1;   // 1 up to N-1
      oneway_xor #(.XOR_WHEN(stack_pkg::DIR_UP)) u_xor (
        .up_dn (up_dn),
        .l_in  (fw[PREV]),
        .r_in  (bw[NEXT]),
        .side  (POLY[K] & addr[K-1]),
        .l_out (bw[m]),
        .r_out (fw[m])
      );
    end
  end
endmodule
