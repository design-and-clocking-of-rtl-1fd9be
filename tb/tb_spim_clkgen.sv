// tb_spim_clkgen: the model must stay quiet while `run` is low, produce its
// first rising edge one half period after `run` rises, oscillate with period
// 2*(BASE + speed*STEP) ps for each speed setting, stop low after `run`
// falls (finishing its period), and pass the test clock in test mode.
// Interface: none (top-level testbench); it stops with $finish after a
// TB_RESULT line, or fails on its watchdog. Timing: the model's own ps-scale
// delays, checked within 1 ps. The reference models here are this
// testbench's own; the expected behaviour is the document's.
module tb_spim_clkgen;
  localparam int BASE = 5900, STEP = 200;
  logic run = 0, test_mode = 0, test_clk = 0, clk_out;
  logic [2:0] speed = 0;
  int checks = 0, failures = 0;
  int n_edges = 0;
  realtime t_edge [$];

  spim_clkgen #(.BASE_PS(BASE), .STEP_PS(STEP)) dut (.*);

  always @(posedge clk_out) begin
    n_edges++;
    t_edge.push_back($realtime);
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // times compare within 1 ps (real arithmetic in the simulator's time unit)
  function automatic bit near(realtime a, realtime b);
    return (a - b) < 1ps && (b - a) < 1ps;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    realtime t0, per;
    #100ns;
    check("no clock while stopped", n_edges == 0);
    for (int sp = 0; sp < 8; sp += 3) begin
      speed = 3'(sp);
      t_edge.delete();
      n_edges = 0;
      t0 = $realtime;
      run = 1;
      #200ns;
      run = 0;
      #100ns;
      per = 2.0 * (BASE + sp * STEP) * 1ps;
      check($sformatf("first edge after half period (speed %0d)", sp),
            t_edge.size() > 2 && near(t_edge[0] - t0, per / 2));
      check($sformatf("period (speed %0d)", sp), t_edge.size() > 2 && near(t_edge[1] - t_edge[0], per));
      check($sformatf("stops after run falls (speed %0d)", sp),
            t_edge.size() > 0 && t_edge[t_edge.size() - 1] < t0 + 200ns + per && clk_out == 0);
    end
    n_edges = 0;
    test_mode = 1;
    repeat (5) begin #50ns test_clk = 1; #50ns test_clk = 0; end
    check("test clock passes in test mode", n_edges == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
