// tb_piped_carry: streams of 4 chunks (first chunk restarts the carry) of
// three random 16-bit numbers each; the 16-bit outputs of each stream, put
// side by side, plus the final carry must equal the sum of the chunks at
// their weights. The carry latched before each stream is random, so a
// missing restart is caught.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: 10 ns clock, inputs
// changed 1 ns after the rising edge. The reference models here are this
// testbench's own; the expected behaviour is the document's.
module tb_piped_carry;
  localparam int K = 16;
  logic clk = 0;
  logic en, first;
  logic [K-1:0] s_chunk, c_chunk, n_chunk, sum_now;
  logic [1:0] carry_next, carry_q;
  int checks = 0, failures = 0;

  piped_carry #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] want, got;
    en = 0; first = 0;
    for (int st = 0; st < 200; st++) begin
      // leave a non-zero carry behind
      en = 1; first = 1; s_chunk = '1; c_chunk = '1; n_chunk = '1;
      @(posedge clk); #1;
      want = '0; got = '0;
      for (int g = 0; g < 4; g++) begin
        en = 1; first = (g == 0);
        s_chunk = K'($urandom); c_chunk = K'($urandom); n_chunk = K'($urandom);
        if (st == 1) begin s_chunk = '1; c_chunk = '1; n_chunk = '1; end
        want += (128'(s_chunk) + 128'(c_chunk) + 128'(n_chunk)) << (K * g);
        #1;
        got |= 128'(sum_now) << (K * g);
        if (g == 3) got += 128'(carry_next) << (K * 4);
        @(posedge clk); #1;
      end
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL stream %0d: got %h want %h", st, got, want);
      end
    end
    // hold: with en low the carry must not change
    en = 1; first = 1; s_chunk = '1; c_chunk = '1; n_chunk = '0;
    @(posedge clk); #1;
    en = 0; first = 0; s_chunk = '1; c_chunk = '1; n_chunk = '1;
    @(posedge clk); #1;
    checks++;
    if (carry_q != 2'd1) begin
      failures++;
      $display("FAIL carry changed while disabled: %0d", carry_q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
