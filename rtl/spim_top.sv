// spim_top: iterative 4-2 multiplier with its stoppable clock and IEEE
// rounding of the product.
//
// spim_core forms the exact 2N-bit product of two N-bit unsigned operands
// (default 64 x 64, the significand of double-extended precision) on the
// array clock made by spim_clkgen, which runs only while the core asks for
// it (or in loop mode, or replaced by an external test clock). The rounding
// stage reads the latched carry-save upper half of the product and rounds it
// to N bits with ieee_round, treating the operands as significands 1.f
// (x, y >= 2^(N-1)) so that the product lies in [1, 4).
// Interface: hold x, y and `start` until `busy` rises (the first array clock
// edge); `done` rises when the product is latched, and `product`, `mant`,
// `exp_adj` and `inexact` are then valid until the next product is taken.
// Keeping `start` high pipes a new product in every N/K array cycles.
// `clk_out` brings the array clock out to a pin for measurement.
// Document: iterative 4-2 array, stoppable clock, rounding. Own choices:
// the start/busy/done handshake and the exp_adj output.
module spim_top
  import spim_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned K = 16
) (
  input  logic           rst_n,
  input  logic           start,
  input  logic           loop_mode,
  input  logic [2:0]     speed,
  input  logic           test_mode,
  input  logic           test_clk,
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  input  round_mode_t    rmode,
  input  logic           sign,
  output logic           clk_out,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] product,
  output logic [N-1:0]   mant,
  output logic [1:0]     exp_adj,
  output logic           inexact
);
  logic         aclk, run;
  logic [N-1:0] hi_s, hi_c;
  logic         sticky;

  spim_clkgen u_clk (
    .run, .speed, .test_mode, .test_clk, .clk_out(aclk)
  );

  spim_core #(.N(N), .K(K)) u_core (
    .clk(aclk), .rst_n, .start, .loop_mode, .x, .y,
    .run, .busy, .done, .product, .hi_s, .hi_c, .sticky
  );

  // Round bit at product bit N-2: window bits N+1..0 cover product bits
  // 2N-1..N-2. The two lowest window bits are already resolved product bits.
  ieee_round #(.N(N)) u_rnd (
    .a      ({hi_s, product[N-1:N-2]}),
    .b      ({hi_c, 2'b00}),
    .cin    (1'b0),
    .sticky (sticky),
    .mode   (rmode),
    .sign   (sign),
    .mant, .exp_adj, .inexact
  );

  assign clk_out = aclk;
endmodule
