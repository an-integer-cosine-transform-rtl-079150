// Self-checking test of the output mixer.  Every vector period the test
// offers eight new random coefficients, but only in the load cycle
// (counter = 6); in all other cycles it offers different random values that
// must be ignored.  Coefficient Y_k of each loaded vector must appear on
// y_out in the cycle of the next period where the counter equals k.
module tb_ict_out_mixer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W  = 16;
  localparam int NV = 50;

  logic         load;
  logic [2:0]   idx;
  logic [W-1:0] y_even [4];
  logic [W-1:0] y_odd  [4];
  logic [W-1:0] y_out;
  logic [W-1:0] vals [NV][8];

  ict_out_mixer #(.W(W)) dut (.clk, .load, .idx, .y_even, .y_odd, .y_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (vals[p, k]) vals[p][k] = W'($urandom);
    for (int c = 0; c < 8 * NV + 8; c++) begin
      @(negedge clk);
      idx  = 3'(c % 8);
      load = (c % 8 == 6);
      for (int i = 0; i < 4; i++) begin
        if (load && c / 8 < NV) begin
          y_even[i] = vals[c / 8][2*i];
          y_odd[i]  = vals[c / 8][2*i + 1];
        end else begin
          y_even[i] = W'($urandom);
          y_odd[i]  = W'($urandom);
        end
      end
      if (c >= 8 && c / 8 - 1 < NV) begin
        checks++;
        if (y_out !== vals[c / 8 - 1][c % 8]) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %h exp %h", c, y_out, vals[c / 8 - 1][c % 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
