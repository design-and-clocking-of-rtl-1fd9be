// booth_select: Booth select multiplexer for one partial product.
//
// Picks 0, X or 2X by the digit's `one`/`two` lines into an (N+1)-bit field
// and inverts the field when the digit is negative. Rather than sign-extend
// a negative partial product, it prepends one bit holding the inverted sign,
// so the (N+2)-bit output `e` is never negative. With F = N+1:
//   digit * X == e + neg - 2^F
// `neg` is the "+1" that completes the two's complement; the core adds it
// in the low-order carry logic. The -2^F of all digits together is a
// constant that the final adder adds in once. Both are this design's way of
// handling the negative Booth partial products, which the document only
// notes as something that must be handled.
// Combinational; the core latches the outputs at the input of the tree.
module booth_select
  import spim_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]  x,     // multiplicand
  input  booth_digit_t  dig,
  output logic [N+1:0]  e,     // biased partial product
  output logic          neg    // +1 owed for the two's complement
);
  logic [N:0] m;

  always_comb begin
    // one and two are never both set by the encoder; `one` wins if they are
    if (dig.one)      m = {1'b0, x};
    else if (dig.two) m = {x, 1'b0};
    else              m = '0;
    e   = {~dig.neg, dig.neg ? ~m : m};
    neg = dig.neg;
  end
endmodule
