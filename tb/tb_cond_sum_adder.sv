// tb_cond_sum_adder: the compound adder must give a+b and a+b+1 (mod 2^W)
// for random and corner-case operands.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_cond_sum_adder;
  localparam int W = 65;
  logic [W-1:0] a, b, s0, s1;
  int checks = 0, failures = 0;

  cond_sum_adder #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = {$urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom};
      if (i == 0) begin a = '1; b = '0; end
      if (i == 1) begin a = '1; b = '1; end
      if (i == 2) begin a = '0; b = '0; end
      if (i % 7 == 3) b = ~a;
      #1;
      checks++;
      if (s0 != W'(a + b) || s1 != W'(a + b + 1'b1)) begin
        failures++;
        $display("FAIL a=%h b=%h s0=%h s1=%h", a, b, s0, s1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
