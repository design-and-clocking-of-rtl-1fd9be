// booth_encoder: modified 2-bit (radix-4) Booth encoder for one group of
// multiplier bits.
//
// `ybits` holds 2*DIG multiplier bits plus, in bit 0, the bit just below the
// group (zero for the least significant group). Digit j looks at the
// overlapping triplet ybits[2j+2:2j] = (y[2j+1], y[2j], y[2j-1]) and takes
// the value -2*y[2j+1] + y[2j] + y[2j-1], in {-2..2}. Each digit comes out
// as the three select lines of spim_pkg::booth_digit_t.
// With DIG = 8 (the default) one encoder turns 16 multiplier bits into the
// 8 partial-product selects that the 8-input tree takes each cycle.
// Combinational; the core registers the digits as their own pipe stage.
// Document: modified 2-bit Booth encoding and its triplet rule. Own choice:
// the one/two/neg select-line encoding.
module booth_encoder
  import spim_pkg::*;
#(
  parameter int unsigned DIG = 8
) (
  input  logic [2*DIG:0]            ybits,
  output booth_digit_t [DIG-1:0]    dig
);
  for (genvar j = 0; j < DIG; j++) begin : g_dig
    logic b2, b1, b0;
    assign {b2, b1, b0} = ybits[2*j +: 3];
    assign dig[j].one = b1 ^ b0;
    assign dig[j].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
    assign dig[j].neg = b2 & ~(b1 & b0);
  end
endmodule
