// spim_clkgen: behavioural model of the stoppable on-chip clock generator.
// This is a behavioural model (not synthesizable logic): the real part is a
// ring oscillator whose period is set by gate delays.
//
// A ring of inverters closed through a NAND gate oscillates while `run` is
// high; when `run` falls the ring finishes its period and rests with the
// clock low, so no short pulse is produced. A multiplexer on the `speed`
// bits picks the length of the feedback inverter chain, tuning the period in
// steps of two inverter delays so it can be matched to the slowest 4-2 pipe
// stage. In test mode an external test clock replaces the ring output
// (the datapath is static, so it may run down to DC).
// Timing model: half period = BASE_PS + speed * STEP_PS picoseconds; the
// first rising edge comes one half period after `run` rises (start-up).
// Defaults give a 5.9 ns half period (11.8 ns, about 85 MHz) at speed 0;
// the step of 2 x 100 ps stands for two inverter delays. These numbers are
// this model's choice.
// Tool notes: the delays depend on `speed`, so lint cannot prove them
// non-zero (they are at least BASE_PS). Synthesis turns the model into a
// latch-like cell; only the test-clock multiplexer is real logic here.
module spim_clkgen #(
  parameter int unsigned SPEED_W = 3,
  parameter int unsigned BASE_PS = 5900,
  parameter int unsigned STEP_PS = 200
) (
  input  logic               run,
  input  logic [SPEED_W-1:0] speed,
  input  logic               test_mode,
  input  logic               test_clk,
  output logic               clk_out
);
  logic ring;

  initial ring = 1'b0;

  always begin
    if (run && !test_mode) begin
      #((BASE_PS + speed * STEP_PS) * 1ps) ring = 1'b1;
      #((BASE_PS + speed * STEP_PS) * 1ps) ring = 1'b0;
    end else begin
      @(run or test_mode);
    end
  end

  assign clk_out = test_mode ? test_clk : ring;
endmodule
