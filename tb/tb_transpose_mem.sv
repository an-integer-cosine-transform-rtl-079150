// Self-checking test of the transposition memory.  Random 64-word blocks
// stream in back to back; each block must come out 64 cycles later with
// rows and columns exchanged (output word j is input word 8*(j%8) + j/8),
// whichever direction the block was written in.  The test also counts the
// direction changes of the register file and requires both kinds.
module tb_transpose_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W  = 16;
  localparam int NB = 9;

  logic         rst_n;
  logic [W-1:0] din, dout;
  logic         by_cols;
  logic [W-1:0] w [NB * 64];

  transpose_mem #(.W(W), .START(7'd0)) dut (.clk, .rst_n, .din, .dout, .by_cols);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int to_cols = 0, to_rows = 0;
    logic prev;
    foreach (w[i]) w[i] = W'($urandom);
    rst_n = 0;
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = by_cols;
    for (int c = 0; c < NB * 64 + 64; c++) begin
      din = (c < NB * 64) ? w[c] : '0;
      if (c >= 64 && c < NB * 64 + 64) begin
        automatic int b = (c - 64) / 64;
        automatic int j = (c - 64) % 64;
        checks++;
        if (dout !== w[64 * b + 8 * (j % 8) + j / 8]) begin
          failures++;
          if (failures < 10) $display("block %0d word %0d: got %h exp %h", b, j, dout, w[64 * b + 8 * (j % 8) + j / 8]);
        end
      end
      @(negedge clk);
      if (by_cols && !prev) to_cols++;
      if (!by_cols && prev) to_rows++;
      prev = by_cols;
    end
    checks++;
    if (to_cols < 2 || to_rows < 2) begin
      failures++;
      $display("direction changes: to columns %0d, to rows %0d", to_cols, to_rows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
