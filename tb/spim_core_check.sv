// spim_core_check: drives and checks one spim_core of K multiplier bits per
// cycle (N = 64) on the clock it is given; used by tb_spim_core.
// Every edge where the controller takes operands pushes {x, y, edge number}
// on a queue; every edge where it latches a result pops one entry and, half
// a cycle later, checks: the 128-bit product equals x*y, fs+fc equals the
// upper product half, `sticky` equals the OR of product bits 61..0, and the
// result edge is N/K + log2(K/2) edges after the operand edge (7 for
// K = 16: the 8th edge counting the operand edge as the 1st).
// Phase 1 issues single products (start pulsed) with random and corner-case
// operands and checks that `run`/`busy` drop after the result (clock stop).
// Phase 2 holds `start` high and changes the operands every cycle; results
// must then come every N/K cycles. It counts negative Booth digits, operands
// with y msb set (unsigned correction) and nonzero low-order carries, and
// fails if any never happened (carries of 2 are reported only: they are too
// rare under random data to require). `finished` rises when it is done.
// Interface: clk in; checks, failures and finished out. Timing: stimulus
// changes on the falling edge of the given clock. The reference model is
// this checker's own; the expected timing is the document's.
module spim_core_check #(
  parameter int K = 16                         // multiplier bits per cycle
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int N = 64;
  localparam int G = N / K;                    // cycles per product (pipelined rate)
  localparam int LAT = G + $clog2(K / 2);      // edges from operands to result, minus 1
  logic rst_n, start, loop_mode, run, busy, done, sticky;
  logic [N-1:0] x, y, hi_s, hi_c;
  logic [2*N-1:0] product;
  int n_neg = 0, n_msb = 0, n_c1 = 0, n_c2 = 0, n_res = 0;

  spim_core #(.N(N), .K(K)) dut (.*);


  typedef struct { logic [N-1:0] x, y; int e; } job_t;
  job_t jobs [$];
  job_t cur;
  int   edge_no = 0, last_res = -1;
  bit   pend = 0, piped = 0;

  always @(posedge clk) begin
    edge_no++;
    if (dut.accept) jobs.push_back('{x, y, edge_no});
    if (dut.res_load) begin
      cur = jobs.pop_front();
      checks++;
      if (edge_no - cur.e != LAT) begin
        failures++;
        $display("FAIL K=%0d: latency: operands at edge %0d, result at edge %0d", K, cur.e, edge_no);
      end
      if (piped && last_res >= 0) begin
        checks++;
        if (edge_no - last_res != G) begin
          failures++;
          $display("FAIL K=%0d: pipelined spacing %0d", K, edge_no - last_res);
        end
      end
      last_res = edge_no;
      pend = 1;
    end
    if (dut.u_ctrl.tag[0].v)
      for (int j = 0; j < K / 2; j++) if (dut.dig_q[j].neg) n_neg++;
    if (dut.pc_en && dut.pc_cnext != 2'd0) n_c1++;
    if (dut.pc_en && dut.pc_cnext == 2'd2) n_c2++;
  end

  always @(negedge clk) begin
    if (pend) begin
      logic [2*N-1:0] want;
      pend = 0;
      n_res++;
      want = (2*N)'(cur.x) * (2*N)'(cur.y);
      checks++;
      if (product !== want || N'(hi_s + hi_c) !== want[2*N-1:N] ||
          sticky !== (|want[N-3:0]) || !done) begin
        failures++;
        $display("FAIL K=%0d: x=%h y=%h product=%h want=%h sticky=%b done=%b", K,
                 cur.x, cur.y, product, want, sticky, done);
      end
      if (cur.y[N-1]) n_msb++;
    end
  end

  function automatic logic [N-1:0] rnd64(int i);
    logic [N-1:0] v;
    v = {$urandom, $urandom};
    case (i % 8)
      0: v = '1;
      1: v = '0;
      2: v = {1'b1, {(N-1){1'b0}}};
      3: v = v << ($urandom % 64);
      4: v = v >> ($urandom % 64);
      default: ;
    endcase
    return v;
  endfunction

  initial begin
    checks = 0; failures = 0; finished = 0;
    rst_n = 0; start = 0; loop_mode = 0; x = '0; y = '0;
    #22 rst_n = 1;
    // phase 1: single products
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      x = rnd64(i); y = rnd64(i / 8 + 3 * i);
      start = 1;
      @(negedge clk);
      start = 0;
      x = {$urandom, $urandom}; y = {$urandom, $urandom};
      repeat (LAT) @(negedge clk);
      checks++;
      if (busy || run) begin
        failures++;
        $display("FAIL K=%0d: clock request still up after the result", K);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    // phase 2: start held, one product per 4 cycles
    piped = 1;
    last_res = -1;
    @(negedge clk);
    start = 1;
    x = rnd64(7); y = rnd64(2);
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      x = rnd64(i + 5); y = rnd64(3 * i);
    end
    start = 0;
    repeat (12) @(negedge clk);
    checks++;
    if (jobs.size() != 0 || n_res < 340) begin
      failures++;
      $display("FAIL K=%0d: %0d results, %0d jobs left", K, n_res, jobs.size());
    end
    checks++;
    if (n_neg == 0 || n_msb == 0 || n_c1 == 0) begin
      failures++;
      $display("FAIL K=%0d: mechanism never exercised: neg=%0d msb=%0d carry=%0d", K, n_neg, n_msb, n_c1);
    end
    $display("K=%0d: results=%0d booth_neg=%0d y_msb=%0d low_carry=%0d low_carry2=%0d",
             K, n_res, n_neg, n_msb, n_c1, n_c2);
    finished = 1;
  end
endmodule
