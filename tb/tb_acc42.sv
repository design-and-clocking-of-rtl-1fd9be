// tb_acc42: accumulates runs of 4 random carry-save inputs (zeroing on the
// first of each run) and checks, exactly, that the value held in the
// accumulator times 2^(16*g) plus every 16-bit pair that was shifted out at
// its own weight equals the sum of all inputs at their weights. Also checks
// each step: next == (acc >> 16 or 0) + ts + tc, modulo 2^W.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: 10 ns clock, inputs
// changed 1 ns after the rising edge. The reference models here are this
// testbench's own; the expected behaviour is the document's.
module tb_acc42;
  localparam int W = 82;
  localparam int SH = 16;
  logic clk = 0;
  logic zero;
  logic [W-1:0] ts, tc, acc_s, acc_c, nxt_s, nxt_c;
  logic [SH-1:0] drop_s, drop_c;
  int checks = 0, failures = 0;

  acc42 #(.W(W), .SHIFT(SH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0] total, dropped, held;
    logic [W-1:0] step_want;
    for (int run = 0; run < 100; run++) begin
      total = '0;
      dropped = '0;
      for (int g = 0; g < 4; g++) begin
        zero = (g == 0);
        ts = {2'b0, $urandom, $urandom, 16'($urandom)} >> 2;
        tc = {2'b0, $urandom, $urandom, 16'($urandom)} >> 2;
        if (run == 3) begin ts = {3'b0, {(W-3){1'b1}}}; tc = ts; end
        if (g > 0)
          dropped += (256'(drop_s) + 256'(drop_c)) << (SH * (g - 1));
        total += (256'(ts) + 256'(tc)) << (SH * g);
        #1;
        step_want = (zero ? '0 : (acc_s >> SH) + (acc_c >> SH)) + ts + tc;
        checks++;
        if (W'(nxt_s + nxt_c) != step_want) begin
          failures++;
          $display("FAIL step run %0d g %0d", run, g);
        end
        @(posedge clk);
        #1;
      end
      held = (256'(acc_s) + 256'(acc_c)) << (SH * 3);
      checks++;
      if (held + dropped != total) begin
        failures++;
        $display("FAIL run %0d: held+dropped %h total %h", run, held + dropped, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
