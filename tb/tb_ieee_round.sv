// tb_ieee_round: random exact values 1 <= p < 4 (in units of the round bit,
// 66 bits wide), split into random carry-save pairs with a random carry-in
// and sticky bit, rounded in all four modes and both signs, compared with a
// reference that rounds the exact value directly. Directed values exercise
// ties, results that round up to 2 (or, in directed modes, 4), and the
// overflow frame. Values stay at or below the largest product of two 64-bit
// significands, (2^64-1)^2, as the block requires. Counts each
// case and fails if one never occurred.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_ieee_round;
  import spim_pkg::*;
  localparam int N = 64;
  logic [N+1:0] a, b;
  logic cin, sticky, sign, inexact;
  round_mode_t mode;
  logic [N-1:0] mant;
  logic [1:0] exp_adj;
  int checks = 0, failures = 0;
  int n_tie = 0, n_ovf = 0, n_carry_out = 0, n_up = 0;

  ieee_round #(.N(N)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try_value(input logic [N+1:0] v, input logic st);
    logic [N+1:0] q, rem, ulp;
    logic ovf, up, inx, tie;
    logic [N:0] res;
    logic [N-1:0] m_want;
    logic [1:0] e_want;
    for (int md = 0; md < 4; md++) begin
      for (int sg = 0; sg < 2; sg++) begin
        mode = round_mode_t'(md);
        sign = sg[0];
        sticky = st;
        cin = 1'($urandom);
        a = {$urandom, $urandom, 2'($urandom)};
        b = v - a - (N+2)'(cin);
        #1;
        ovf = v[N+1];
        ulp = ovf ? 4 : 2;
        q = v / ulp;
        rem = v % ulp;
        inx = (rem != 0) || st;
        tie = (rem == ulp / 2) && !st;
        unique case (mode)
          RND_NEAREST: up = (rem > ulp / 2) || ((rem == ulp / 2) && (st || q[0]));
          RND_ZERO:    up = 1'b0;
          RND_POS_INF: up = inx && !sign;
          default:     up = inx && sign;
        endcase
        res = (N+1)'(q) + (N+1)'(up);
        if (res[N]) begin
          m_want = {1'b1, {(N-1){1'b0}}};
          e_want = 2'(ovf) + 2'd1;
          n_carry_out++;
        end else begin
          m_want = res[N-1:0];
          e_want = {1'b0, ovf};
        end
        if (tie && mode == RND_NEAREST) n_tie++;
        if (ovf) n_ovf++;
        if (up) n_up++;
        checks++;
        if (mant != m_want || exp_adj != e_want || inexact != inx) begin
          failures++;
          $display("FAIL v=%h st=%b cin=%b mode=%s sign=%b: mant=%h exp=%0d inx=%b want %h %0d %b",
                   v, st, cin, mode.name(), sign, mant, exp_adj, inexact, m_want, e_want, inx);
        end
      end
    end
  endtask

  initial begin
    logic [N+1:0] v;
    for (int i = 0; i < 3000; i++) begin
      v = {$urandom, $urandom, 2'($urandom)};
      v[N+1:N] = (v[N+1:N] == 2'b00) ? 2'b01 : v[N+1:N];   // 1 <= p < 4
      unique case (i % 6)
        0: v[1:0] = 2'b01;                       // exact half in no-overflow frame
        1: v[N-1:0] = '1;                        // all ones below: rounds up to a power of 2
        2: begin v[N+1] = 1'b1; v[1:0] = 2'b10; end
        3: v = {2'b11, {(N-3){1'b1}}, 3'b000};   // largest product of two significands
        default: ;
      endcase
      if (v > {2'b11, {(N-3){1'b1}}, 3'b000}) v = {2'b11, {(N-3){1'b1}}, 3'b000};
      try_value(v, 1'($urandom));
      try_value(v, 1'b0);
    end
    checks++;
    if (n_tie == 0 || n_ovf == 0 || n_carry_out == 0 || n_up == 0) begin
      failures++;
      $display("FAIL case never hit: tie=%0d ovf=%0d carry_out=%0d up=%0d", n_tie, n_ovf, n_carry_out, n_up);
    end
    $display("cases: tie=%0d ovf=%0d carry_out=%0d up=%0d", n_tie, n_ovf, n_carry_out, n_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
