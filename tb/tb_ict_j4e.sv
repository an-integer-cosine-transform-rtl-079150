// Self-checking test of the J4e processor (the even half of the 1-D ICT).
// Random four-word input sequences stream in back to back, one word per
// Clk2 slot, in the order the input processor delivers them; the four
// even coefficients of each sequence are compared, in slot t = 10 of its
// schedule, with the products by kernel rows 0, 2, 4, 6 written out in full.
module tb_ict_j4e;
  import ict_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W  = 16;
  localparam int NV = 100;

  logic         ce2;
  logic [1:0]   ph;
  logic [W-1:0] a_in;
  logic [W-1:0] y [4];

  ict_j4e #(.W(W)) dut (.clk, .ce2, .ph, .a_in, .y0(y[0]), .y2(y[1]),
              .y4(y[2]), .y6(y[3]));

  // av[n][k] is the k-th word of sequence n as it arrives:
  // even half: a0, a1, a2, a3; odd half: a7, a6, a5, a4.
  int av [NV][4];
  localparam int ROWS [4] = '{0, 2, 4, 6};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (av[n, k]) av[n][k] = $urandom_range(0, 1023) - 512;
    for (int k = 0; k < 4; k++) begin
      av[0][k] = 511;
      av[1][k] = (k % 2 == 0) ? 511 : -512;
    end
    ce2 = 0;
    for (int s = 0; s < 4 * NV + 16; s++) begin
      // slot s: two Clk1 cycles, ce2 high in the first
      @(negedge clk);
      ce2  = 1;
      ph   = 2'(s % 4);
      a_in = (s < 4 * NV) ? W'(av[s / 4][s % 4]) : '0;
      if (s % 4 == 2 && s >= 14 && (s - 14) / 4 < NV) begin
        automatic int n = (s - 14) / 4;
        for (int i = 0; i < 4; i++) begin
          automatic int e = 0;
          for (int k = 0; k < 4; k++) e += J[ROWS[i]][k] * av[n][k];
          checks++;
          if ($signed(y[i]) != e) begin
            failures++;
            if (failures < 10) $display("seq %0d row %0d: got %0d exp %0d", n, ROWS[i], $signed(y[i]), e);
          end
        end
      end
      @(negedge clk);
      ce2 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
