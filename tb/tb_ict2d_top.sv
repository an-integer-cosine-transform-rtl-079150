// End-to-end test of the 2-D ICT processor at its default (and only) size.
// A stream of 8x8 pixel blocks (random ones and extreme ones: all 255, all
// -256, and a pattern that drives the odd-odd coefficients to their
// maximum) enters back to back, one pixel per cycle, from the first cycle
// after reset.  Each output coefficient is compared with the direct 2-D
// product J x J^t, in the column-wise output order, and, for the blocks that
// are read normalized, with round(Y * k_u * k_v) from floating-point row
// norms.  The first coefficient must appear 147 cycles after the first
// pixel.  The test also checks dout_valid and dout_start and counts the
// mechanisms of the design: back-to-back blocks, both directions of the
// transposition memory and both output modes (norm_sel), failing if one
// never happens.
module tb_ict2d_top;
  import ict_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NB  = 24;
  localparam int LAT = 147;

  logic        rst_n, norm_sel;
  logic [8:0]  x;
  logic [22:0] dout;
  logic        dout_valid, dout_start, ce2, m1, m2, mem_by_cols;

  ict2d_top dut (.clk, .rst_n, .x, .norm_sel, .dout, .dout_valid, .dout_start,
                 .ce2, .m1, .m2, .mem_by_cols);

  longint px [NB][8][8];    // [block][row][col]
  longint yr [NB][8][8];    // [block][u][v]

  // Output block b is read normalized when this is 1.
  function automatic bit norm_of(int b);
    return (b % 3 == 1) || (b == 3);
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_norm = 0, n_raw = 0, to_cols = 0, to_rows = 0, n_blocks = 0, n_start = 0;
    logic prev_dir;
    for (int b = 0; b < NB; b++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          px[b][r][c] = longint'($urandom_range(0, 511)) - 256;
          if (b == 1 || b == 4) px[b][r][c] = 255;
          if (b == 2 || b == 3) px[b][r][c] = -256;
          if (b == 5) px[b][r][c] = ((J[1][r] > 0) == (J[1][c] > 0)) ? 255 : -256;
        end
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          yr[b][u][v] = 0;
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++)
              yr[b][u][v] += J[u][r] * px[b][r][c] * J[v][c];
        end
    end

    rst_n = 0; x = '0; norm_sel = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev_dir = mem_by_cols;
    for (int c = 0; c < NB * 64 + LAT; c++) begin
      // inputs for cycle c
      x = (c < NB * 64) ? 9'(px[c / 64][(c / 8) % 8][c % 8]) : '0;
      norm_sel = (c + 3 >= LAT) ? norm_of((c + 3 - LAT) / 64) : 1'b0;
      // outputs of cycle c
      checks++;
      if (dout_valid !== (c >= LAT)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dout_valid=%b", c, dout_valid);
      end
      if (c >= LAT) begin
        automatic int i = c - LAT;
        automatic int b = i / 64;
        automatic int v = (i % 64) / 8;
        automatic int u = i % 8;
        automatic longint e = norm_of(b) ? normalize(yr[b][u][v], u, v) : yr[b][u][v];
        checks++;
        if (longint'($signed(dout)) != e || dout_start !== (i % 64 == 0)) begin
          failures++;
          if (failures < 10) $display("block %0d Y(%0d,%0d): got %0d exp %0d start=%b",
                                      b, u, v, $signed(dout), e, dout_start);
        end
        if (i % 64 == 63) begin
          n_blocks++;
          if (norm_of(b)) n_norm++; else n_raw++;
        end
      end
      if (dout_start) n_start++;
      @(negedge clk);
      if (mem_by_cols && !prev_dir) to_cols++;
      if (!mem_by_cols && prev_dir) to_rows++;
      prev_dir = mem_by_cols;
    end
    $display("blocks out %0d (normalized %0d, unnormalized %0d), memory turns to columns %0d, to rows %0d, block starts %0d",
             n_blocks, n_norm, n_raw, to_cols, to_rows, n_start);
    checks++;
    if (n_blocks != NB || n_start != NB) failures++;
    checks++;
    if (n_norm == 0 || n_raw == 0) failures++;
    checks++;
    if (to_cols == 0 || to_rows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
