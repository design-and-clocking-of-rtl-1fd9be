// tb_spim_cpa: the final adder must return
//   (res_s + res_c + neg_lo + c_lo) * 2^(N-K) + low_lo + (BIAS + corr) * 2^N
// modulo 2^(2N), where BIAS*2^N = -(2^(N+1) * sum_{k<N/2} 4^k) undoes the
// Booth partial-product bias; and fs + fc must equal the upper half.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: combinational, one input
// set per 1 ns step. The reference models here are this testbench's own; the
// expected behaviour is the document's.
module tb_spim_cpa;
  localparam int N = 64, K = 16, TW = N + K + 2;
  logic [TW-1:0] res_s, res_c;
  logic [N-K-1:0] low_lo;
  logic [1:0] c_lo;
  logic [K-1:0] neg_lo;
  logic [N-1:0] corr, fs, fc;
  logic [2*N-1:0] product;
  int checks = 0, failures = 0;

  spim_cpa #(.N(N), .K(K), .TW(TW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] bias, want, s4;
    s4 = '0;
    for (int k = 0; k < N/2; k++) s4 += (2*N)'(1) << (N + 1 + 2*k);
    bias = -s4;
    for (int i = 0; i < 3000; i++) begin
      res_s = {$urandom, $urandom, $urandom};
      res_c = {$urandom, $urandom, $urandom};
      low_lo = {$urandom, $urandom};
      c_lo = 2'($urandom % 3);
      neg_lo = K'($urandom);
      corr = {$urandom, $urandom};
      if (i == 0) begin res_s = '1; res_c = '1; neg_lo = '1; c_lo = 2; end
      #1;
      want = ((2*N)'(res_s) + (2*N)'(res_c) + (2*N)'(neg_lo) + (2*N)'(c_lo)) << (N - K);
      want += (2*N)'(low_lo) + bias + ((2*N)'(corr) << N);
      checks++;
      if (product != want || N'(fs + fc) != want[2*N-1:N]) begin
        failures++;
        $display("FAIL i=%0d product=%h want=%h", i, product, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
