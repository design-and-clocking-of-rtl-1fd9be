// spim_cpa: final correction row and carry-propagate adder of the multiplier.
//
// Converts the latched carry-save result into the binary 2N-bit product.
// Inputs are what the result latch captured when the last partial sum left
// the accumulator:
//  * res_s/res_c: the accumulator pair, whose bit 0 weighs 2^(N-K);
//  * low_lo:      the N-K product bits already resolved by piped_carry, with
//                 c_lo, the carry (0..2) out of them;
//  * neg_lo:      the Booth "+1" corrections of the last group;
//  * corr:        y[N-1] ? x : 0. N/2 Booth digits read the multiplier as a
//                 two's complement number, so for an unsigned multiplier with
//                 its top bit set, x*2^N is added back here.
// First the K-bit chunk at the bottom of the accumulator is added (giving
// product bits N-1..N-K and a carry of 0..2). Then one row of 4-2 adders
// merges the upper N accumulator bits, the constant that undoes the bias of
// the Booth partial products (see booth_select), `corr` and that carry (in
// the row's two empty bit-0 slots) into the carry-save pair fs/fc, and an
// N-bit carry-propagate add gives the upper half of the product.
// fs/fc are also output for the rounding logic. Combinational.
// Lint note: bits TW-1..TW-2 of res_s/res_c are unread. They weigh 2^(2N)
// and above, beyond the product, so they vanish in the modulo-2^(2N) sum
// (the biased partial products sum to more than 2^(2N) by design).
module spim_cpa #(
  parameter int unsigned N  = 64,
  parameter int unsigned K  = 16,
  parameter int unsigned TW = N + K + 2
) (
  input  logic [TW-1:0]  res_s,
  input  logic [TW-1:0]  res_c,
  input  logic [N-K-1:0] low_lo,
  input  logic [1:0]     c_lo,
  input  logic [K-1:0]   neg_lo,
  input  logic [N-1:0]   corr,
  output logic [2*N-1:0] product,
  output logic [N-1:0]   fs,
  output logic [N-1:0]   fc
);
  // -(2^(N+1) * sum_{k<N/2} 4^k) mod 2^(2N), divided by 2^N.
  function automatic logic [N-1:0] bias_const();
    logic [N-1:0] s;
    s = '0;
    for (int k = 0; k < N/2; k++) s[2*k] = 1'b1;
    return ~(s << 1) + 1'b1;
  endfunction
  localparam logic [N-1:0] BIAS_HI = bias_const();

  logic [K+1:0] chunk;
  logic [1:0]   c_hi;

  always_comb begin
    chunk = {2'b00, res_s[K-1:0]} + {2'b00, res_c[K-1:0]} + {2'b00, neg_lo}
          + {{K{1'b0}}, c_lo};
    c_hi  = chunk[K+1:K];
  end

  adder42_row #(.W(N)) u_corr (
    .a   (res_s[K +: N]),
    .b   (res_c[K +: N]),
    .d   (BIAS_HI),
    .e   (corr),
    .cin (c_hi[1] | c_hi[0]),
    .cin2(c_hi[1]),
    .s   (fs),
    .c   (fc)
  );

  assign product = {fs + fc, chunk[K-1:0], low_lo};
endmodule
