// spim_ctrl: sequencing of the iterative multiplier.
//
// The array clock only runs while there is work (`run` starts the stoppable
// clock generator). A product is taken in G groups of multiplier bits, one
// group per cycle, and each group then walks down a fixed pipeline:
//   Booth encode -> select MUX latch -> tree level 1 (A/B) -> tree level 2
//   (C) -> accumulator (D) -> low-order carry resolution.
// The controller accepts a product when `start` is high at a group boundary
// (phase 0), issues groups 0..G-1 on consecutive cycles, and follows each
// group with a tag {valid, group} through the stage registers. From the tags
// it derives:
//   acc_zero  - the accumulator takes zero instead of its shifted output
//               (group 0 is in the C register);
//   pc_en/pc_first - low-order carry logic adds a chunk / restarts its carry;
//   capture   - the last group is being selected: save per-product operands
//               the final stage still needs;
//   res_load  - the last group is being accumulated: latch the result.
// If `start` is still high when the last group of one product has been
// encoded, the next product starts on the following cycle, so products flow
// at one per G cycles; otherwise the clock stops right after the result is
// latched. `loop_mode` keeps the clock running regardless.
// With G = 4 and a 2-level tree: encode in cycle 0, result latched at the
// end of cycle 7, i.e. on the 8th clock edge; next product may start in
// cycle 4. `done` is high from that edge until the next product is taken.
// Reset is asynchronous because the clock is stopped when idle.
// Lint note: rst_n is both the asynchronous reset and the disable of the
// group-sequence assertion, which lint reports as a sync/async mix; the
// assertion is not hardware.
module spim_ctrl #(
  parameter int unsigned G      = 4,  // groups per product (N / K)
  parameter int unsigned LEVELS = 2   // 4-2 tree levels
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 loop_mode,
  output logic                 run,
  output logic                 accept,
  output logic [$clog2(G)-1:0] enc_grp,
  output logic                 acc_zero,
  output logic                 pc_en,
  output logic                 pc_first,
  output logic                 capture,
  output logic                 res_load,
  output logic                 busy,
  output logic                 done
);
  localparam int unsigned GW = $clog2(G);
  // tag registers: [0] encoder, [1] select MUX, [2..LEVELS+1] tree levels,
  // [LEVELS+2] accumulator
  localparam int unsigned NT = LEVELS + 3;

  typedef struct packed {
    logic          v;
    logic [GW-1:0] grp;
  } tag_t;

  logic [GW-1:0] phase;
  tag_t          tag [NT];
  tag_t          tag_in;
  logic          pipe_busy;

  assign accept  = (phase == '0) && start;
  assign enc_grp = phase;
  assign tag_in  = '{v: accept || (phase != '0), grp: phase};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      for (int i = 0; i < NT; i++) tag[i] <= '0;
      done  <= 1'b0;
    end else begin
      if (tag_in.v) phase <= GW'(phase + 1'b1);
      tag[0] <= tag_in;
      for (int i = 1; i < NT; i++) tag[i] <= tag[i-1];
      if (res_load) done <= 1'b1;
      else if (accept) done <= 1'b0;
    end
  end

  assign acc_zero = tag[NT-2].v && (tag[NT-2].grp == '0);
  assign res_load = tag[NT-2].v && (tag[NT-2].grp == GW'(G-1));
  assign pc_en    = tag[NT-1].v && (tag[NT-1].grp != GW'(G-1));
  assign pc_first = tag[NT-1].v && (tag[NT-1].grp == '0);
  assign capture  = tag[0].v && (tag[0].grp == GW'(G-1));

  always_comb begin
    pipe_busy = (phase != '0);
    for (int i = 0; i < NT-1; i++) pipe_busy |= tag[i].v;
    // the accumulator stage only matters while groups before the last sit there
    pipe_busy |= pc_en;
  end

  assign busy = pipe_busy;
  assign run  = start || pipe_busy || loop_mode;

  // a tag can only advance one group per cycle
  property p_grp_seq;
    @(posedge clk) disable iff (!rst_n)
      (tag[0].v && tag[0].grp != GW'(G-1)) |=> (tag[0].v && tag[0].grp == GW'($past(tag[0].grp) + 1'b1));
  endproperty
  a_grp_seq: assert property (p_grp_seq);
endmodule
