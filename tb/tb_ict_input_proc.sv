// Self-checking test of the input processor.  Random 9-bit samples stream in
// one per cycle; the Clk2 enable and the {M2,M1} select are generated here
// from a cycle counter.  For every vector the test expects, in slot k+1 of
// the following vector period, a_even = x(k) + x(7-k) and
// a_odd = x(k) - x(7-k), k = 0..3.
module tb_ict_input_proc;
  import ict_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic             ce2;
  logic [1:0]       sel;
  logic [W_PIX-1:0] x;
  logic [W_1D-1:0]  a_even, a_odd;

  ict_input_proc #(.W_IN(W_PIX), .W_OUT(W_1D)) dut (.clk, .ce2, .sel, .x, .a_even, .a_odd);

  localparam int NV = 64;
  int xs [NV * 8];

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (xs[i]) xs[i] = $urandom_range(0, 511) - 256;
    for (int i = 0; i < 16; i++) xs[i] = (i < 8) ? 255 : -256;   // extremes
    for (int c = 0; c < NV * 8 + 16; c++) begin
      @(negedge clk);
      ce2 = (c % 2 == 0);
      sel = 2'((c / 2) % 4);
      x   = (c < NV * 8) ? W_PIX'(xs[c]) : '0;
      if (c % 2 == 0 && (c - 2) / 8 >= 1 && (c - 2) / 8 <= NV) begin
        automatic int v = (c - 2) / 8 - 1;
        automatic int k = ((c - 2) % 8) / 2;
        automatic int ee = xs[8*v + k] + xs[8*v + 7 - k];
        automatic int eo = xs[8*v + k] - xs[8*v + 7 - k];
        checks++;
        if ($signed(a_even) != ee || $signed(a_odd) != eo) begin
          failures++;
          if (failures < 10)
            $display("v=%0d k=%0d: a_even=%0d exp %0d, a_odd=%0d exp %0d",
                     v, k, $signed(a_even), ee, $signed(a_odd), eo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
