// acc42: 4-2 carry-save accumulator (the D block).
//
// A row of 4-2 adders with a register on its outputs. Two inputs take the new
// carry-save pair from the tree (ts, tc); the other two take the registered
// pair shifted right by SHIFT bits, because each new pair from the partial
// tree is SHIFT bits more significant than the last. A control multiplexer
// in front selects zero instead of the shifted pair (`zero`), which starts a
// new product. The SHIFT low bits that fall off each cycle are exposed on
// drop_s/drop_c for the low-order carry logic.
// nxt_s/nxt_c are the row outputs before the register, so a result latch can
// capture them on the same edge as the accumulator.
// Timing: one cycle per accumulation. No reset; `zero` initialises it.
// Document: the 4-2 accumulator with right shift and zero MUX of the
// SPIM D block. Own choices: the unregistered nxt_s/nxt_c and drop ports.
module acc42 #(
  parameter int unsigned W     = 82,
  parameter int unsigned SHIFT = 16
) (
  input  logic             clk,
  input  logic             zero,
  input  logic [W-1:0]     ts,
  input  logic [W-1:0]     tc,
  output logic [W-1:0]     acc_s,
  output logic [W-1:0]     acc_c,
  output logic [W-1:0]     nxt_s,
  output logic [W-1:0]     nxt_c,
  output logic [SHIFT-1:0] drop_s,
  output logic [SHIFT-1:0] drop_c
);
  logic [W-1:0] fb_s, fb_c;

  // hard-wired right shift and the zeroing multiplexer
  assign fb_s = zero ? '0 : (acc_s >> SHIFT);
  assign fb_c = zero ? '0 : (acc_c >> SHIFT);

  adder42_row #(.W(W)) u_row (
    .a   (fb_s),
    .b   (fb_c),
    .d   (ts),
    .e   (tc),
    .cin (1'b0),
    .cin2(1'b0),
    .s   (nxt_s),
    .c   (nxt_c)
  );

  always_ff @(posedge clk) begin
    acc_s <= nxt_s;
    acc_c <= nxt_c;
  end

  assign drop_s = acc_s[SHIFT-1:0];
  assign drop_c = acc_c[SHIFT-1:0];
endmodule
