// tb_sticky_tz: the sticky bit from the operands' trailing zeros must equal
// the OR of the low 62 bits of the full 128-bit product, for random operands
// with random numbers of trailing zeros (and zero operands).
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_sticky_tz;
  localparam int N = 64;
  localparam int TH = 62;
  logic [N-1:0] x, y;
  logic [$clog2(2*N+1)-1:0] tz_sum;
  logic sticky;
  int checks = 0, failures = 0;
  int hit0 = 0, hit1 = 0;

  sticky_tz #(.N(N), .THRESH(TH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] p;
    for (int i = 0; i < 4000; i++) begin
      x = {$urandom, $urandom} | 64'h1;
      y = {$urandom, $urandom} | 64'h1;
      x = x << ($urandom % 64);
      y = y << ($urandom % 64);
      if (i == 0) x = '0;
      if (i == 1) begin x = 64'h1 << 31; y = 64'h1 << 31; end  // 62 zeros exactly
      if (i == 2) begin x = 64'h1 << 30; y = 64'h1 << 31; end  // 61 zeros
      #1;
      p = (2*N)'(x) * (2*N)'(y);
      checks++;
      if (sticky != (|p[TH-1:0])) begin
        failures++;
        $display("FAIL x=%h y=%h sticky=%b", x, y, sticky);
      end
      if (sticky) hit1++; else hit0++;
    end
    checks++;
    if (hit0 == 0 || hit1 == 0) begin
      failures++;
      $display("FAIL only one sticky value exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
