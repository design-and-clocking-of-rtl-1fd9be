// piped_carry: pipelined resolution of the bits that fall off the accumulator.
//
// Each cycle the accumulator shifts K carry-save bit pairs out of its low
// end. This block adds them, together with K bits of pending Booth "+1"
// corrections of the same weight (`n_chunk`) and the carry kept from the
// previous, less significant chunk, in a K-bit adder. The K sum bits are
// final product bits; the carry (0, 1 or 2, since three K-bit numbers are
// added) is latched for the next chunk. On the first chunk of a product
// (`first`) the latched carry is ignored, so no carry leaks between products.
// `sum_now` and `carry_next` are the adder outputs before the latch, so the
// last chunk can be captured by a result latch on the same edge.
// Timing: one chunk per cycle while `en` is high.
// Document: low-order bits resolved in a pipelined carry circuit as they
// leave the accumulator. Own choices: the Booth +1 input and `first`.
module piped_carry #(
  parameter int unsigned K = 16
) (
  input  logic         clk,
  input  logic         en,
  input  logic         first,
  input  logic [K-1:0] s_chunk,
  input  logic [K-1:0] c_chunk,
  input  logic [K-1:0] n_chunk,
  output logic [K-1:0] sum_now,
  output logic [1:0]   carry_next,
  output logic [1:0]   carry_q
);
  logic [K+1:0] total;

  always_comb begin
    total = {2'b00, s_chunk} + {2'b00, c_chunk} + {2'b00, n_chunk}
          + {{K{1'b0}}, (first ? 2'b00 : carry_q)};
    sum_now    = total[K-1:0];
    carry_next = total[K+1:K];
  end

  always_ff @(posedge clk) begin
    if (en) carry_q <= carry_next;
  end
endmodule
