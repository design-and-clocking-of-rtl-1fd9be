// tree42: partial, pipelined 4-2 tree.
//
// Reduces NUM_PP aligned partial products to one carry-save pair. Level 0
// groups the inputs four at a time into rows of 4-2 adders (the A and B
// blocks of the 8-input tree); each further level takes two carry-save pairs
// from the level above into one row (the C block). Every level ends in a
// register, so a new set of partial products enters on every cycle and the
// pair for a set appears LEVELS = log2(NUM_PP/2) cycles after it entered.
// All vectors share one bit weighting (the partial products arrive already
// shifted); W must hold the sum, as the top carries of each row are dropped.
// No reset: the controller ignores the contents until they are valid.
// Interface: pp (NUM_PP vectors of W bits) -> s, c. Document: the partial
// 4-2 tree pipelined after each level. Own choice: flip-flops instead of
// the chip's latches.
module tree42 #(
  parameter int unsigned NUM_PP = 8,
  parameter int unsigned W      = 82
) (
  input  logic                    clk,
  input  logic [NUM_PP-1:0][W-1:0] pp,
  output logic [W-1:0]            s,
  output logic [W-1:0]            c
);
  localparam int unsigned LEVELS = $clog2(NUM_PP) - 1;

  // lvl[l][k] is vector k entering level l (k < NUM_PP >> l).
  logic [W-1:0] lvl [LEVELS+1][NUM_PP];

  for (genvar k = 0; k < NUM_PP; k++) begin : g_in
    assign lvl[0][k] = pp[k];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NIN = NUM_PP >> l;
    for (genvar k = 0; k < NIN/4; k++) begin : g_row
      logic [W-1:0] rs, rc;
      adder42_row #(.W(W)) u_row (
        .a   (lvl[l][4*k+0]),
        .b   (lvl[l][4*k+1]),
        .d   (lvl[l][4*k+2]),
        .e   (lvl[l][4*k+3]),
        .cin (1'b0),
        .cin2(1'b0),
        .s   (rs),
        .c   (rc)
      );
      // pipeline latch after every level of 4-2 adders
      always_ff @(posedge clk) begin
        lvl[l+1][2*k+0] <= rs;
        lvl[l+1][2*k+1] <= rc;
      end
    end
    for (genvar k = NIN/2; k < NUM_PP; k++) begin : g_unused
      assign lvl[l+1][k] = '0;
    end
  end

  assign s = lvl[LEVELS][0];
  assign c = lvl[LEVELS][1];
endmodule
