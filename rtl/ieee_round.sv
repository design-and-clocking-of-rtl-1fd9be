// ieee_round: IEEE 754 rounding of a carry-save product (Algorithm 6.3).
//
// Input is the upper part of an unnormalised product 1 <= p < 4 in
// carry-save form, a and b, N+2 bits each: bit N+1 is the overflow bit V,
// bit 1 is L (the last result bit when there is no overflow) and bit 0 is R,
// the round bit. `cin` is the carry into R from the bits below it and
// `sticky` says whether any of those bits is non-zero.
//
// Round to nearest runs the round-to-nearest/up scheme whose point is that
// the long addition starts before `cin` is known:
//  * Rsum + Rcarry + Rin (Rin = 1) already tells whether the carry from R
//    into L lies in {0,1} or {1,2}. A row of half adders over bits L..V frees
//    one slot at L, filled with Rsum | Rcarry, so the remaining carry is 0
//    or 1;
//  * a compound adder computes both A+B and A+B+1 of the half-adder outputs;
//  * with cin known, a first choice assuming no overflow (Rv = 0) gives the
//    V bit; Rv = V then adds the extra half unit an overflowed result needs,
//    and the final choice is made (the table of the five R-column bits);
//    a and b are taken modulo 2^(N+2), so the rounded value must stay below
//    4: true for any product of two N-bit significands, which is at most
//    4 - 2^(3-N) and never rounds to nearest up to 4;
//  * ties: round-to-nearest/up differs from round-to-nearest/even only when
//    the bits below the result's LSB are exactly one half, and then only in
//    the LSB, which is forced to 0.
// Round toward zero uses the same path with Rin = Rv = 0 (half-adder slot
// filled with Rsum & Rcarry). The rule the document gives for the two
// directed modes (add 1 to the truncated result when any discarded bit is 1,
// when the sign points away from zero) is applied here with an incrementer
// on the truncated result: this incrementer is this design's own choice.
//
// Outputs: mant, the N-bit significand (leading 1 included), exp_adj, the
// amount to add to the exponent (1 for the normalising right shift, 2 if a
// directed round-up then carries out of an overflowed result), and inexact.
// Combinational.
module ieee_round
  import spim_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N+1:0] a,
  input  logic [N+1:0] b,
  input  logic         cin,
  input  logic         sticky,
  input  round_mode_t  mode,
  input  logic         sign,     // sign of the product, for directed modes
  output logic [N-1:0] mant,
  output logic [1:0]   exp_adj,
  output logic         inexact
);
  logic         rs, rc;
  logic [N:0]   hi_a, hi_b;      // bits V..L
  logic         nearest;
  logic         slot;            // value put into the free slot at L
  logic [N:0]   hs, hc;          // half-adder row outputs
  logic [N:0]   p0, p1;          // A+B and A+B+1
  logic [1:0]   r;               // Rsum + Rcarry + cin
  logic [2:0]   t_pre, t_fin;    // carry from R into L
  logic         rv;
  logic [N:0]   p;
  logic         v;
  logic         r_bit, s_bit;    // round and sticky bits in the result frame
  logic [N-1:0] m_sel;
  logic         away;
  logic [N:0]   m_inc;

  assign rs      = a[0];
  assign rc      = b[0];
  assign hi_a    = a[N+1:1];
  assign hi_b    = b[N+1:1];
  assign nearest = (mode == RND_NEAREST);
  assign slot    = nearest ? (rs | rc) : (rs & rc);

  // half-adder row with the free slot at L
  assign hs = hi_a ^ hi_b;
  assign hc = {hi_a[N-1:0] & hi_b[N-1:0], slot};

  cond_sum_adder #(.W(N+1)) u_csadd (
    .a (hs),
    .b (hc),
    .s0(p0),
    .s1(p1)
  );

  always_comb begin
    r = {1'b0, rs} + {1'b0, rc} + {1'b0, cin};
    // first choice, assuming no overflow rounding bit (Rv = 0)
    t_pre = nearest ? 3'((r + 3'd1) >> 1) : 3'(r >> 1);
    rv    = nearest & (((t_pre - 3'(slot)) == 3'd1) ? p1[N] : p0[N]);
    // final choice with the real Rv
    t_fin = nearest ? 3'((r + 3'd1 + 3'(rv)) >> 1) : t_pre;
    p     = ((t_fin - 3'(slot)) == 3'd1) ? p1 : p0;
    v     = p[N];

    // round and sticky bits below the result LSB, in the result's frame
    if (v) begin
      r_bit = hi_a[0] ^ hi_b[0] ^ r[1];
      s_bit = r[0] | sticky;
    end else begin
      r_bit = r[0];
      s_bit = sticky;
    end
    inexact = r_bit | s_bit;

    m_sel = v ? p[N:1] : p[N-1:0];
    // nearest/up -> nearest/even: a tie leaves the LSB at 0
    if (nearest && r_bit && !s_bit) m_sel[0] = 1'b0;

    away  = ((mode == RND_POS_INF) && !sign) || ((mode == RND_NEG_INF) && sign);
    m_inc = {1'b0, m_sel} + 1'b1;

    if (away && inexact) begin
      if (m_inc[N]) begin
        mant    = {1'b1, {(N-1){1'b0}}};
        exp_adj = 2'(v) + 2'd1;
      end else begin
        mant    = m_inc[N-1:0];
        exp_adj = {1'b0, v};
      end
    end else begin
      mant    = m_sel;
      exp_adj = {1'b0, v};
    end
  end
endmodule
