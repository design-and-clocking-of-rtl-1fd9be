// sticky_tz: sticky bit computed from the operands instead of the product.
//
// The number of trailing zeros of x*y equals the trailing zeros of x plus
// those of y. So the product bits below the round bit (THRESH of them) are
// all zero exactly when tz(x) + tz(y) >= THRESH, and the sticky bit is the
// negation of that. It works in parallel with the multiply and needs no
// product bits at all. A zero operand counts as N trailing zeros (product 0,
// sticky 0). Combinational.
// Interface: x, y -> sticky; THRESH is the number of product bits below
// the round bit. Document: sticky from operand trailing zeros (the
// method valid for Booth). Own choice: the counting loop that forms tz.
module sticky_tz #(
  parameter int unsigned N      = 64,
  parameter int unsigned THRESH = 62
) (
  input  logic [N-1:0]           x,
  input  logic [N-1:0]           y,
  output logic [$clog2(2*N+1)-1:0] tz_sum,
  output logic                   sticky
);
  localparam int unsigned CW = $clog2(2*N+1);

  function automatic logic [CW-1:0] tz(input logic [N-1:0] v);
    logic [CW-1:0] n;
    logic          found;
    n = '0;
    found = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (!found && !v[i]) n = n + 1'b1;
      if (v[i]) found = 1'b1;
    end
    return n;
  endfunction

  always_comb begin
    tz_sum = tz(x) + tz(y);
    sticky = (tz_sum < CW'(THRESH));
  end
endmodule
