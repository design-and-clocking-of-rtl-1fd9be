// tb_adder42_row: random check of a 16-bit row of 4-2 adders: the carry-save
// outputs must add up to the sum of the four inputs and both carry-in slots,
// modulo 2^16.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_adder42_row;
  localparam int W = 16;
  logic [W-1:0] a, b, d, e, s, c;
  logic cin, cin2;
  int checks = 0, failures = 0;

  adder42_row #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W+2:0] ref_sum;
    for (int i = 0; i < 3000; i++) begin
      a = W'($urandom); b = W'($urandom); d = W'($urandom); e = W'($urandom);
      cin = 1'($urandom); cin2 = 1'($urandom);
      if (i < 4) begin a = '1; b = '1; d = '1; e = '1; cin = 1; cin2 = 1; end
      #1;
      ref_sum = (W+3)'(a) + (W+3)'(b) + (W+3)'(d) + (W+3)'(e) + (W+3)'(cin) + (W+3)'(cin2);
      checks++;
      if (W'(s + c) != W'(ref_sum)) begin
        failures++;
        $display("FAIL a=%h b=%h d=%h e=%h -> s=%h c=%h", a, b, d, e, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
