// tb_spim_ctrl: checks the sequencing of one product and of back-to-back
// products. For a single `start`, counting the accepting edge as edge 1:
// acc_zero is high before edge 5, res_load before edge 8, the low-order
// carry logic is enabled before edges 6, 7 and 8 (restarting before edge 6),
// and busy/run fall right after edge 8 with done high. With `start` held,
// res_load must come every 4 cycles; loop_mode must keep run high.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: 10 ns clock, inputs
// changed at the falling edge. The reference models here are this
// testbench's own; the expected behaviour is the document's.
module tb_spim_ctrl;
  logic clk = 0, rst_n, start, loop_mode;
  logic run, accept, acc_zero, pc_en, pc_first, capture, res_load, busy, done;
  logic [1:0] enc_grp;
  int checks = 0, failures = 0;

  spim_ctrl #(.G(4), .LEVELS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic want, input int edge_no);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s before edge %0d: got %b want %b", what, edge_no, got, want);
    end
  endtask

  initial begin
    int last_res, n_res;
    rst_n = 0; start = 0; loop_mode = 0;
    #12 rst_n = 1;
    @(negedge clk);
    expect_bit("run idle", run, 0, 0);
    start = 1;
    #1 expect_bit("run on start", run, 1, 0);
    // edges 1..8
    for (int e = 1; e <= 9; e++) begin
      @(negedge clk);
      if (e == 1) start = 0;
      // values now are those before edge e+1
      expect_bit("acc_zero", acc_zero, (e + 1 == 5), e + 1);
      expect_bit("res_load", res_load, (e + 1 == 8), e + 1);
      expect_bit("pc_en", pc_en, (e + 1 >= 6 && e + 1 <= 8), e + 1);
      expect_bit("pc_first", pc_first, (e + 1 == 6), e + 1);
      expect_bit("capture", capture, (e + 1 == 5), e + 1);
      expect_bit("busy", busy, (e + 1 <= 8), e + 1);
      expect_bit("done", done, (e >= 8), e + 1);
    end
    expect_bit("run stopped", run, 0, 10);
    // back-to-back products
    start = 1;
    last_res = -1; n_res = 0;
    for (int c = 0; c < 24; c++) begin
      @(negedge clk);
      if (res_load) begin
        if (last_res >= 0) expect_bit("res_load spacing 4", (c - last_res) == 4, 1, c);
        last_res = c;
        n_res++;
      end
    end
    checks++;
    if (n_res < 4) begin failures++; $display("FAIL only %0d results in pipelined mode", n_res); end
    start = 0;
    repeat (10) @(negedge clk);
    expect_bit("idle after pipeline", busy, 0, 0);
    loop_mode = 1;
    #1 expect_bit("loop keeps run", run, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
