// cond_sum_adder: compound ("conditional sum" / carry-select) adder.
//
// Produces both a + b (`s0`) and a + b + 1 (`s1`) at once. The generate and
// propagate terms and the sum XORs are shared; only the carry chain is built
// twice, once with a carry-in of 0 and once with 1. The rounding logic picks
// one of the two results late, once the carry from lower bits is known.
// Results are taken mod 2^W. Combinational.
// Lint note: the carries out of the top bit (c0[W], c1[W]) are unread,
// since the sums are defined modulo 2^W.
// Interface: a, b (W bits) -> s0, s1. Document: the compound adder that the
// rounding scheme calls for. Own choice: a ripple carry pair in the
// model; the document does not fix the carry network.
module cond_sum_adder #(
  parameter int unsigned W = 65
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s0,
  output logic [W-1:0] s1
);
  logic [W-1:0] p, g;
  logic [W:0]   c0, c1;

  assign p     = a ^ b;
  assign g     = a & b;
  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;

  // the two carry chains
  for (genvar i = 0; i < W; i++) begin : g_chain
    assign c0[i+1] = g[i] | (p[i] & c0[i]);
    assign c1[i+1] = g[i] | (p[i] & c1[i]);
  end

  assign s0 = p ^ c0[W-1:0];
  assign s1 = p ^ c1[W-1:0];
endmodule
