// tb_booth_encoder: every digit must equal -2*y[2j+1] + y[2j] + y[2j-1] and
// be encoded consistently (at most one of one/two, neg only for non-zero
// digits); the digits weighted by 4^j must give back the group's value
// (16 bits read as two's complement plus the bit below the group).
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_booth_encoder;
  import spim_pkg::*;
  localparam int DIG = 8;
  logic [2*DIG:0] ybits;
  booth_digit_t [DIG-1:0] dig;
  int checks = 0, failures = 0;

  booth_encoder #(.DIG(DIG)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dval(booth_digit_t d);
    int m;
    m = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -m : m;
  endfunction

  initial begin
    longint total, expect_total;
    for (int i = 0; i < 3000; i++) begin
      ybits = (2*DIG+1)'($urandom);
      if (i < 2) ybits = (i == 0) ? '1 : '0;
      #1;
      total = 0;
      for (int j = 0; j < DIG; j++) begin
        int want;
        want = -2 * int'(ybits[2*j+2]) + int'(ybits[2*j+1]) + int'(ybits[2*j]);
        checks++;
        if (dval(dig[j]) != want || (dig[j].one && dig[j].two) ||
            (dig[j].neg && !dig[j].one && !dig[j].two)) begin
          failures++;
          $display("FAIL ybits=%b digit %0d = %b want %0d", ybits, j, dig[j], want);
        end
        total += longint'(dval(dig[j])) * (longint'(1) << (2*j));
      end
      // value of y[15:0] as signed 16-bit plus y[-1]
      expect_total = longint'($signed(ybits[2*DIG:1])) + longint'(ybits[0]);
      checks++;
      if (total != expect_total) begin
        failures++;
        $display("FAIL ybits=%b sum %0d want %0d", ybits, total, expect_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
