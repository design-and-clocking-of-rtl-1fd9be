// spim_core: iterative N x N multiplier built from a partial, pipelined 4-2
// tree and a 4-2 carry-save accumulator (the SPIM organisation).
//
// The multiplier y is taken K bits per cycle. Each group is Booth encoded
// (K/2 radix-4 digits), the digits pick multiples of x in the Booth select
// MUXes, the K/2 partial products go into a K/2-input 4-2 tree pipelined
// after every level, and the tree's carry-save output is added into the 4-2
// accumulator, whose previous value is shifted right by K bits first. The K
// carry-save bits that leave the accumulator each cycle are resolved by a
// pipelined carry circuit into final low product bits. After the last group
// the accumulator pair is latched with everything the last step needs, and a
// final correction row and carry-propagate adder (spim_cpa) form the 2N-bit
// product combinationally, as in a flow-through part.
//
// Default N = 64, K = 16: 8 Booth digits per cycle, 8-input tree of 2
// levels, 4 groups. Pipe timing (cycle 0 = encode of group 0, before the
// first clock edge):
//   cycle: 0    1    2    3    4    5    6    7
//   enc    g0   g1   g2   g3
//   MUX         g0   g1   g2   g3
//   A/B              g0   g1   g2   g3
//   C                     g0   g1   g2   g3
//   D (acc)                    g0   g1   g2   g3
// The result is latched on the 8th edge; a following product can be
// encoded from cycle 4, one product every 4 cycles.
// Operands are sampled on the edge that ends cycle 0 (x and y must be
// stable while `start` is high before that edge). `sticky` comes from the
// operands' trailing zeros (sticky_tz) for a round bit at product bit
// 2N-2-N = N-2, i.e. the bits below it number N-2.
// The Booth sign handling (biased partial products, "+1" bits added in the
// low-order carry logic, an unsigned correction term) is this design's own.
// Lint notes: the accumulator's registered pair (acc_s/acc_c) and the
// piped-carry register (pc_cq) are outputs of the sub-blocks that this
// level does not need (it reads the next-state values for the result latch);
// sticky_tz's tz_sum output is left open for the same reason.
module spim_core
  import spim_pkg::*;
#(
  parameter int unsigned N = 64,   // operand width
  parameter int unsigned K = 16    // multiplier bits retired per cycle
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           loop_mode,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic           run,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product,
  output logic [N-1:0]   hi_s,     // carry-save upper half (rounding)
  output logic [N-1:0]   hi_c,
  output logic           sticky    // any product bit below bit N-2 set
);
  localparam int unsigned DIG    = K / 2;
  localparam int unsigned G      = N / K;
  localparam int unsigned GW     = $clog2(G);
  localparam int unsigned LEVELS = $clog2(DIG) - 1;
  localparam int unsigned PW     = N + 2;         // biased partial product
  localparam int unsigned TW     = N + K + 2;     // tree/accumulator width

  // ---------------- control ----------------
  logic          accept, acc_zero, pc_en, pc_first, capture, res_load;
  logic [GW-1:0] enc_grp;

  spim_ctrl #(.G(G), .LEVELS(LEVELS)) u_ctrl (
    .clk, .rst_n, .start, .loop_mode,
    .run, .accept, .enc_grp, .acc_zero, .pc_en, .pc_first,
    .capture, .res_load, .busy, .done
  );

  // ---------------- operands ----------------
  logic [N-1:0] x_q, y_q;
  always_ff @(posedge clk) begin
    if (accept) begin
      x_q <= x;
      y_q <= y;
    end
  end

  // ---------------- Booth encode stage ----------------
  logic [N:0]                 y_ext;
  booth_digit_t [DIG-1:0]     dig, dig_q;

  assign y_ext = {(accept ? y : y_q), 1'b0};

  booth_encoder #(.DIG(DIG)) u_enc (
    .ybits(y_ext[enc_grp*K +: K+1]),
    .dig  (dig)
  );

  always_ff @(posedge clk) dig_q <= dig;

  // ---------------- Booth select stage ----------------
  logic [DIG-1:0][TW-1:0] pp, pp_q;
  logic [K-1:0]           negv;

  for (genvar j = 0; j < DIG; j++) begin : g_sel
    logic [PW-1:0] e;
    logic          ng;
    booth_select #(.N(N)) u_sel (.x(x_q), .dig(dig_q[j]), .e(e), .neg(ng));
    assign pp[j]          = TW'(e) << (2*j);
    assign negv[2*j]      = ng;
    assign negv[2*j+1]    = 1'b0;
  end

  always_ff @(posedge clk) pp_q <= pp;

  // Booth "+1" bits follow their group down the pipe:
  // neg_p[0] = select latch, neg_p[1..LEVELS] = tree levels, neg_p[LEVELS+1] = accumulator
  logic [K-1:0] neg_p [LEVELS+2];
  always_ff @(posedge clk) begin
    neg_p[0] <= negv;
    for (int i = 1; i < LEVELS + 2; i++) neg_p[i] <= neg_p[i-1];
  end

  // ---------------- 4-2 tree ----------------
  logic [TW-1:0] t_s, t_c;
  tree42 #(.NUM_PP(DIG), .W(TW)) u_tree (.clk, .pp(pp_q), .s(t_s), .c(t_c));

  // ---------------- 4-2 accumulator ----------------
  logic [TW-1:0] acc_s, acc_c, nxt_s, nxt_c;
  logic [K-1:0]  drop_s, drop_c;

  acc42 #(.W(TW), .SHIFT(K)) u_acc (
    .clk, .zero(acc_zero), .ts(t_s), .tc(t_c),
    .acc_s, .acc_c, .nxt_s, .nxt_c, .drop_s, .drop_c
  );

  // ---------------- low-order carry ----------------
  logic [K-1:0]   pc_sum;
  logic [1:0]     pc_cnext, pc_cq;
  logic [GW-1:0]  pc_idx;
  logic [N-K-1:0] low_q;

  piped_carry #(.K(K)) u_pc (
    .clk, .en(pc_en), .first(pc_first),
    .s_chunk(drop_s), .c_chunk(drop_c), .n_chunk(neg_p[LEVELS+1]),
    .sum_now(pc_sum), .carry_next(pc_cnext), .carry_q(pc_cq)
  );

  always_ff @(posedge clk) begin
    if (pc_first) pc_idx <= GW'(1);
    else if (pc_en) pc_idx <= GW'(pc_idx + 1'b1);
  end

  always_ff @(posedge clk) begin
    if (pc_en) low_q[(pc_first ? 0 : int'(pc_idx))*K +: K] <= pc_sum;
  end

  // ---------------- per-product values for the last step ----------------
  // Taken while the last group is encoded (the operand latches may reload on
  // that edge) and carried down beside the tree like the Booth "+1" bits, so
  // each product's values reach the result latch whatever N/K and the tree
  // depth are. corr_p[i] lines up with neg_p[i].
  logic [N-1:0] corr_p [LEVELS+1];
  logic         stk_p  [LEVELS+1];
  logic         stk;

  sticky_tz #(.N(N), .THRESH(N-2)) u_stk (.x(x_q), .y(y_q), .tz_sum(), .sticky(stk));

  always_ff @(posedge clk) begin
    if (capture) begin
      corr_p[0] <= y_q[N-1] ? x_q : '0;
      stk_p[0]  <= stk;
    end
    for (int i = 1; i < LEVELS + 1; i++) begin
      corr_p[i] <= corr_p[i-1];
      stk_p[i]  <= stk_p[i-1];
    end
  end

  // ---------------- result latch ----------------
  logic [TW-1:0]  res_s, res_c;
  logic [N-K-1:0] res_low;
  logic [1:0]     res_clo;
  logic [K-1:0]   res_neg;
  logic [N-1:0]   res_corr;
  logic           res_stk;
  logic [N-K-1:0] low_all;

  // the chunk being resolved on the result edge is taken before its latch
  always_comb begin
    low_all = low_q;
    low_all[(G-2)*K +: K] = pc_sum;
  end

  always_ff @(posedge clk) begin
    if (res_load) begin
      res_s    <= nxt_s;
      res_c    <= nxt_c;
      res_low  <= low_all;
      res_clo  <= pc_cnext;
      res_neg  <= neg_p[LEVELS];
      res_corr <= corr_p[LEVELS];
      res_stk  <= stk_p[LEVELS];
    end
  end

  spim_cpa #(.N(N), .K(K), .TW(TW)) u_cpa (
    .res_s, .res_c, .low_lo(res_low), .c_lo(res_clo), .neg_lo(res_neg),
    .corr(res_corr), .product, .fs(hi_s), .fc(hi_c)
  );

  assign sticky = res_stk;
endmodule
