// tb_spim_top: end-to-end test of the multiplier at its default size
// (64 x 64), clocked by the stoppable clock generator model.
// Each product: the testbench puts two significands (x, y >= 2^63) and a
// rounding mode/sign on the pins, raises `start`, and drops it when `busy`
// rises. When `done` rises it checks the 128-bit product against x*y and
// mant/exp_adj/inexact against a reference rounding of the exact product,
// then checks that the array clock has stopped and the product took 8 array
// clock edges. Sections: random operands in all four rounding modes;
// constructed ties (y = 1.5, x odd); double-precision (53-bit)
// significands at the top of the operands; a product just below 2 rounded
// up to 2 (mantissa carry-out); products held back-to-back with `start` high (one
// result per 4 array clocks); the external test clock in test mode; loop
// mode (clock keeps running when idle); the period set by each speed code.
// Every mechanism is counted and the test fails if one never happened.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: the clock generator
// model's array clock (11.8 ns at speed 0). The reference models here are
// this testbench's own; the expected behaviour is the document's.
module tb_spim_top;
  import spim_pkg::*;
  localparam int N = 64;

  logic           rst_n, start, loop_mode, test_mode, test_clk, sign;
  logic [2:0]     speed;
  logic [N-1:0]   x, y, mant;
  round_mode_t    rmode;
  logic           clk_out, busy, done, inexact;
  logic [2*N-1:0] product;
  logic [1:0]     exp_adj;

  spim_top dut (.*);

  int checks = 0, failures = 0;
  int n_mode [4];
  int n_neg = 0, n_corr = 0, n_tie = 0, n_ovf = 0, n_noovf = 0, n_cout = 0;
  int n_inexact = 0, n_exact = 0, n_pipe = 0, n_test = 0, n_stop = 0, n_loop = 0, n_speed = 0;
  int edges = 0;

  always @(posedge clk_out) begin
    edges++;
    if (dut.u_core.u_ctrl.tag[0].v)
      for (int j = 0; j < 8; j++) if (dut.u_core.dig_q[j].neg) n_neg++;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: round the exact product to N bits
  task automatic check_result(input logic [N-1:0] xx, input logic [N-1:0] yy,
                              input round_mode_t md, input logic sg);
    logic [2*N-1:0] p;
    logic [N:0]     q;
    logic [N-1:0]   rem, half, m_w;
    logic           ovf, up, inx, tie;
    logic [1:0]     e_w;
    p    = (2*N)'(xx) * (2*N)'(yy);
    ovf  = p[2*N-1];
    q    = ovf ? (N+1)'(p >> N) : (N+1)'(p >> (N-1));
    rem  = ovf ? p[N-1:0] : {1'b0, p[N-2:0]};
    half = ovf ? {1'b1, {(N-1){1'b0}}} : {2'b01, {(N-2){1'b0}}};
    inx  = rem != 0;
    tie  = rem == half;
    case (md)
      RND_NEAREST: up = (rem > half) || (tie && q[0]);
      RND_ZERO:    up = 1'b0;
      RND_POS_INF: up = inx && !sg;
      default:     up = inx && sg;
    endcase
    q = q + (N+1)'(up);
    if (q[N]) begin
      m_w = {1'b1, {(N-1){1'b0}}};
      e_w = 2'(ovf) + 2'd1;
      n_cout++;
    end else begin
      m_w = q[N-1:0];
      e_w = {1'b0, ovf};
    end
    n_mode[md]++;
    if (tie && md == RND_NEAREST) n_tie++;
    if (ovf) n_ovf++; else n_noovf++;
    if (inx) n_inexact++; else n_exact++;
    if (yy[N-1]) n_corr++;
    checks++;
    if (product !== p || mant !== m_w || exp_adj !== e_w || inexact !== inx) begin
      failures++;
      $display("FAIL x=%h y=%h %s sign=%b: product=%h mant=%h exp=%0d inx=%b, want %h %h %0d %b",
               xx, yy, md.name(), sg, product, mant, exp_adj, inexact, p, m_w, e_w, inx);
    end
  endtask

  function automatic logic [N-1:0] signif();
    logic [N-1:0] v;
    v = {$urandom, $urandom};
    v[N-1] = 1'b1;
    case ($urandom % 6)
      0: v = '1;
      1: v = {1'b1, {(N-1){1'b0}}};
      2: v[N-2:0] = v[N-2:0] << ($urandom % 63);
      default: ;
    endcase
    return v;
  endfunction

  // one product with start pulsed; checks latency and clock stop
  task automatic one_product(input logic [N-1:0] xx, input logic [N-1:0] yy,
                             input round_mode_t md, input logic sg);
    int e0;
    x = xx; y = yy; rmode = md; sign = sg;
    e0 = edges;
    #1ns start = 1;
    wait (busy);
    #1ns start = 0;
    x = {$urandom, $urandom}; y = {$urandom, $urandom};   // pins free again
    wait (done);
    #1ns;
    checks++;
    if (edges - e0 != 8) begin
      failures++;
      $display("FAIL %0d array clock edges for one product, want 8", edges - e0);
    end
    check_result(xx, yy, md, sg);
    if (!loop_mode && !test_mode) begin
      e0 = edges;
      #100ns;
      checks++;
      if (edges != e0 || clk_out !== 1'b0) begin
        failures++;
        $display("FAIL array clock still running after the result");
      end else n_stop++;
    end
  endtask

  initial begin
    logic [N-1:0] xx, yy;
    rst_n = 0; start = 0; loop_mode = 0; test_mode = 0; test_clk = 0; sign = 0;
    speed = 3'd0; x = '0; y = '0; rmode = RND_NEAREST;
    #50ns rst_n = 1;
    #20ns;

    // random products, all rounding modes
    for (int i = 0; i < 600; i++)
      one_product(signif(), signif(), round_mode_t'(i % 4), 1'($urandom));

    // ties: y = 1.5, x odd and below 4/3 (no overflow)
    for (int i = 0; i < 40; i++) begin
      xx = {2'b10, 62'($urandom)} | 64'd1;
      one_product(xx, {2'b11, 62'd0}, round_mode_t'(i % 4), 1'($urandom));
    end

    // double-precision significands (53 bits, 1.f) placed at the top of the
    // 64-bit operands, as a double multiply would use this array
    for (int i = 0; i < 30; i++)
      one_product({1'b1, 52'({$urandom, $urandom}), 11'd0},
                  {1'b1, 52'({$urandom, $urandom}), 11'd0}, round_mode_t'(i % 4), 1'($urandom));

    // just below 2, rounded up: mantissa carries out
    one_product(64'hB504F333F9DE6484, 64'hB504F333F9DE6484, RND_POS_INF, 1'b0);
    one_product(64'hB504F333F9DE6484, 64'hB504F333F9DE6484, RND_NEG_INF, 1'b1);
    one_product(64'hB504F333F9DE6484, 64'hB504F333F9DE6484, RND_NEAREST, 1'b0);

    // back-to-back products: start held, one result per 4 array clocks
    begin
      logic [N-1:0] xs [$], ys [$];
      round_mode_t  ms [$];
      logic         ss [$];
      int last_e, got;
      bit seen;
      last_e = -1; got = 0; seen = 0;
      x = signif(); y = signif();
      #1ns start = 1;
      while (got < 80) begin
        @(posedge clk_out);
        if (dut.u_core.accept) begin
          xs.push_back(x); ys.push_back(y);
          ms.push_back(round_mode_t'($urandom % 4)); ss.push_back(1'($urandom));
        end
        seen = dut.u_core.res_load;
        #1ns;
        if (dut.u_core.u_ctrl.phase == 2'd1) begin x = signif(); y = signif(); end
        if (seen) begin
          // the rounding stage reads the latched product and the mode pins
          rmode = ms[0]; sign = ss[0];
          #1ns;
          check_result(xs.pop_front(), ys.pop_front(), ms.pop_front(), ss.pop_front());
          if (last_e >= 0) begin
            checks++;
            if (edges - last_e != 4) begin
              failures++;
              $display("FAIL pipelined results %0d edges apart", edges - last_e);
            end else n_pipe++;
          end
          last_e = edges;
          got++;
        end
      end
      start = 0;
      wait (!busy);
      #100ns;
    end

    // external test clock
    test_mode = 1;
    fork
      begin : tclk
        forever #25ns test_clk = ~test_clk;
      end
      begin
        for (int i = 0; i < 20; i++) begin
          int e0;
          e0 = edges;
          one_product(signif(), signif(), round_mode_t'(i % 4), 1'($urandom));
          if (edges - e0 >= 8) n_test++;
        end
      end
    join_any
    disable tclk;
    test_clk = 0;
    #20ns test_mode = 0;
    #100ns;

    // loop mode: the clock keeps running with nothing to do
    loop_mode = 1;
    for (int i = 0; i < 10; i++) begin
      int e0;
      one_product(signif(), signif(), round_mode_t'(i % 4), 1'($urandom));
      e0 = edges;
      #200ns;
      checks++;
      if (edges - e0 < 10) begin
        failures++;
        $display("FAIL loop mode: clock stopped");
      end else n_loop++;
    end

    // period at each speed setting (loop mode keeps the ring running)
    for (int s = 0; s < 8; s++) begin
      realtime t0, t1;
      speed = 3'(s);
      repeat (2) @(posedge clk_out);
      t0 = $realtime;
      @(posedge clk_out);
      t1 = $realtime;
      checks++;
      if ((t1 - t0) - 2 * (5900 + 200 * s) * 1ps >= 1ps || 2 * (5900 + 200 * s) * 1ps - (t1 - t0) >= 1ps) begin
        failures++;
        $display("FAIL speed %0d: period %t", s, t1 - t0);
      end else n_speed++;
    end
    loop_mode = 0;
    speed = 0;
    #200ns;

    checks++;
    if (n_mode[0] == 0 || n_mode[1] == 0 || n_mode[2] == 0 || n_mode[3] == 0 ||
        n_neg == 0 || n_corr == 0 || n_tie == 0 || n_ovf == 0 || n_noovf == 0 ||
        n_cout == 0 || n_inexact == 0 || n_exact == 0 || n_pipe == 0 || n_test == 0 ||
        n_stop == 0 || n_loop == 0 || n_speed != 8) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("modes=%0d/%0d/%0d/%0d booth_neg=%0d y_msb_corr=%0d tie=%0d ovf=%0d no_ovf=%0d carry_out=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_neg, n_corr, n_tie, n_ovf, n_noovf, n_cout);
    $display("inexact=%0d exact=%0d pipelined=%0d test_clock=%0d clock_stop=%0d loop=%0d speeds=%0d",
             n_inexact, n_exact, n_pipe, n_test, n_stop, n_loop, n_speed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
