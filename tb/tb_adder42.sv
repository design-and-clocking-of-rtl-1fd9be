// tb_adder42: exhaustive check of the 4-2 adder cell against its truth
// table: for all 32 input combinations, sum + 2*(carry + cout) must equal the
// number of ones on in1..in4 and cin, and cout must be the same for cin = 0
// and cin = 1 (no ripple along a row).
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_adder42;
  logic in1, in2, in3, in4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  adder42 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      {in1, in2, in3, in4} = 4'(v);
      for (int ci = 0; ci < 2; ci++) begin
        cin = ci[0];
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(v) + ci) begin
          failures++;
          $display("FAIL in=%b cin=%b sum=%b carry=%b cout=%b", 4'(v), cin, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL cout depends on cin for in=%b", 4'(v));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
