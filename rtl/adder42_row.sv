// adder42_row: a row of W 4-2 adder cells, reducing four W-bit numbers to a
// carry-save pair (sum vector `s`, carry vector `c`).
//
// Cell i adds bit i of a, b, d, e and the `cout` of cell i-1; its `carry`
// and `cout` both carry weight 2^(i+1). The `cout` goes sideways to cell
// i+1; the `carry` lands in bit i+1 of the carry vector. Bit 0 of the carry
// vector is an empty slot: the row's `cin2` input fills it. The first cell's
// intermediate carry-in is a second empty slot, filled by `cin`.
// Result: s + c == a + b + d + e + cin + cin2   (mod 2^W).
// The carries out of the top cell are dropped; callers size W so that the
// true sum fits. Combinational; the pipelined users register the outputs.
// Document: the row of 4-2 cells with lateral cout. Own choice: use of the
// two empty bit-0 slots (cin, cin2) for correction bits.
module adder42_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  input  logic [W-1:0] e,
  input  logic         cin,   // intermediate carry into cell 0
  input  logic         cin2,  // empty bit-0 slot of the carry vector
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0]   chain;   // chain[i] = intermediate carry into cell i
  logic [W-1:0] cy;      // per-cell carry output (weight 2^(i+1))

  assign chain[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_cell
    adder42 u_cell (
      .in1  (a[i]),
      .in2  (b[i]),
      .in3  (d[i]),
      .in4  (e[i]),
      .cin  (chain[i]),
      .sum  (s[i]),
      .carry(cy[i]),
      .cout (chain[i+1])
    );
  end

  assign c = {cy[W-2:0], cin2};
endmodule
