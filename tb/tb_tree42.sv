// tb_tree42: feeds a new random set of 8 partial products on every clock and
// checks that each set's carry-save sum appears exactly two cycles later
// (one register per tree level), modulo 2^W.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: 10 ns clock, inputs
// changed 1 ns after the rising edge. The reference models here are this
// testbench's own; the expected behaviour is the document's.
module tb_tree42;
  localparam int NUM_PP = 8;
  localparam int W = 82;
  localparam int LAT = 2;
  logic clk = 0;
  logic [NUM_PP-1:0][W-1:0] pp;
  logic [W-1:0] s, c;
  logic [W-1:0] expq [$];
  int checks = 0, failures = 0;

  tree42 #(.NUM_PP(NUM_PP), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sum;
    for (int cyc = 0; cyc < 300; cyc++) begin
      sum = '0;
      for (int k = 0; k < NUM_PP; k++) begin
        pp[k] = {$urandom, $urandom, $urandom};
        if (cyc == 5) pp[k] = '1;
        sum += pp[k];
      end
      expq.push_back(sum);
      @(posedge clk);
      #1;
      if (expq.size() >= LAT) begin
        logic [W-1:0] want;
        want = expq.pop_front();
        checks++;
        if (W'(s + c) != want) begin
          failures++;
          $display("FAIL cycle %0d: got %h want %h", cyc, W'(s + c), want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
