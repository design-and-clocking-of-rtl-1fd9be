// tb_booth_select: for random multiplicands and each digit -2..2 the biased
// partial product must satisfy digit*x == e + neg - 2^(N+1).
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_booth_select;
  import spim_pkg::*;
  localparam int N = 64;
  logic [N-1:0] x;
  booth_digit_t dig;
  logic [N+1:0] e;
  logic neg;
  int checks = 0, failures = 0;

  booth_select #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [N+3:0] lhs, rhs;
    for (int i = 0; i < 1000; i++) begin
      x = {$urandom, $urandom};
      if (i == 0) x = '1;
      for (int d = -2; d <= 2; d++) begin
        dig.neg = (d < 0);
        dig.one = (d == 1 || d == -1);
        dig.two = (d == 2 || d == -2);
        #1;
        lhs = (N+4)'(d) * $signed({4'b0, x});
        rhs = $signed({2'b0, e}) + (N+4)'(neg) - ((N+4)'(1) <<< (N+1));
        checks++;
        if (lhs != rhs || neg != (d < 0)) begin
          failures++;
          $display("FAIL x=%h d=%0d e=%h neg=%b", x, d, e, neg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
