// tb_spim_core: checks the multiplier core at three partial-tree sizes at
// once on one free-running clock: K = 16 (the default, 8 Booth partial
// products per cycle), K = 8 and K = 32 (4- and 16-input trees). Each size
// runs in a spim_core_check, which compares every product, the sticky bit,
// the latency and the pipelined rate with independently computed values.
// The test ends when all three are done, or fails on the watchdog.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: 10 ns free-running
// clock. The reference models here are this testbench's own; the expected
// behaviour is the document's.
module tb_spim_core;
  logic clk = 1'b0;
  int   checks [3], failures [3];
  bit   finished [3];
  int   total_checks, total_failures;

  always #5 clk = ~clk;

  spim_core_check #(.K(16)) u_k16 (.clk, .checks(checks[0]), .failures(failures[0]), .finished(finished[0]));
  spim_core_check #(.K(8))  u_k8  (.clk, .checks(checks[1]), .failures(failures[1]), .finished(finished[1]));
  spim_core_check #(.K(32)) u_k32 (.clk, .checks(checks[2]), .failures(failures[2]), .finished(finished[2]));

  initial begin
    #3000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1] + checks[2],
             failures[0] + failures[1] + failures[2] + 1);
    $finish;
  end

  initial begin
    wait (finished[0] && finished[1] && finished[2]);
    total_checks   = checks[0] + checks[1] + checks[2];
    total_failures = failures[0] + failures[1] + failures[2];
    $display("TB_RESULT checks=%0d failures=%0d", total_checks, total_failures);
    $finish;
  end
endmodule
