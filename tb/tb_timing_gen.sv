// Self-checking test of the timing generator: after reset, ce2 (Clk2 phase)
// must be high in every other Clk1 cycle starting with the first, M1 must
// have period 4 and M2 period 8, all in step with a sample counter kept
// here.
module tb_timing_gen;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, ce2, m1, m2;
  int checks = 0, failures = 0;

  timing_gen dut (.clk, .rst_n, .ce2, .m1, .m2);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m1_edges = 0, m2_edges = 0;
    logic m1_prev, m2_prev;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    m1_prev = m1; m2_prev = m2;
    for (int c = 0; c < 200; c++) begin
      // sampled in the middle of cycle c (before its rising edge)
      checks++;
      if (ce2 !== (c % 2 == 0) || m1 !== ((c / 2) % 2 == 1) || m2 !== ((c / 4) % 2 == 1)) begin
        failures++;
        $display("cycle %0d: ce2=%b m1=%b m2=%b", c, ce2, m1, m2);
      end
      if (m1 != m1_prev) m1_edges++;
      if (m2 != m2_prev) m2_edges++;
      m1_prev = m1; m2_prev = m2;
      @(negedge clk);
    end
    // 200 cycles: M1 toggles every 2 cycles, M2 every 4
    checks++;
    if (m1_edges != 99 || m2_edges != 49) begin
      failures++;
      $display("edge counts m1=%0d m2=%0d", m1_edges, m2_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
