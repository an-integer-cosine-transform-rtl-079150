// Accuracy workload for the normalized output, in the style of the IEEE
// 1180-1990 tests.  Random 8x8 blocks are drawn from two input ranges,
// -256..255 and -5..5 (the 9-bit input rules out the third, +-300); each
// normalized 12-bit coefficient is compared with the exact orthonormal
// transform T x T^t (T = K J, computed here in floating point from the row
// norms) rounded to the nearest integer, ties away from zero.  The IEEE 1180 limits are applied
// to the differences: peak error at most 1, mean square error at most 0.06
// for every coefficient and 0.02 overall, mean error at most 0.015 for every
// coefficient and 0.0015 overall.  The blocks run back to back in normalized
// mode through the full-size processor.
module tb_ieee1180_accuracy;
  import ict_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NB  = 4000;   // blocks per input range
  localparam int LAT = 147;

  logic        rst_n, norm_sel;
  logic [8:0]  x;
  logic [22:0] dout;
  logic        dout_valid, dout_start, ce2, m1, m2, mem_by_cols;

  ict2d_top dut (.clk, .rst_n, .x, .norm_sel, .dout, .dout_valid, .dout_start,
                 .ce2, .m1, .m2, .mem_by_cols);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fabs(real a);
    return (a < 0.0) ? -a : a;
  endfunction

  // Statistics of one input range.
  task automatic run_range(input int lo, input int hi);
    longint px [][8][8];
    longint y;
    real    ref_x, err_sum [8][8], err_sq [8][8], tot_sum, tot_sq, pk_mse, pk_me;
    int     peak;
    px = new[NB];
    foreach (px[b, r, c]) px[b][r][c] = longint'($urandom_range(0, hi - lo)) + lo;
    foreach (err_sum[u, v]) begin err_sum[u][v] = 0.0; err_sq[u][v] = 0.0; end
    peak = 0;

    rst_n = 0; x = '0; norm_sel = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NB * 64 + LAT; c++) begin
      x = (c < NB * 64) ? 9'(px[c / 64][(c / 8) % 8][c % 8]) : '0;
      if (c >= LAT) begin
        automatic int i = c - LAT;
        automatic int b = i / 64;
        automatic int v = (i % 64) / 8;
        automatic int u = i % 8;
        automatic int d;
        y = 0;
        for (int r = 0; r < 8; r++)
          for (int cc = 0; cc < 8; cc++)
            y += J[u][r] * px[b][r][cc] * J[v][cc];
        ref_x = real'(y) / $sqrt(real'(row_norm2(u)) * real'(row_norm2(v)));
        d = int'($signed(dout)) - ((ref_x < 0.0) ? -int'($floor(-ref_x + 0.5)) : int'($floor(ref_x + 0.5)));
        err_sum[u][v] += real'(d);
        err_sq[u][v]  += real'(d * d);
        if (d > peak)  peak = d;
        if (-d > peak) peak = -d;
      end
      @(negedge clk);
    end

    tot_sum = 0.0; tot_sq = 0.0; pk_mse = 0.0; pk_me = 0.0;
    foreach (err_sum[u, v]) begin
      tot_sum += err_sum[u][v];
      tot_sq  += err_sq[u][v];
      if (err_sq[u][v] / NB > pk_mse) pk_mse = err_sq[u][v] / NB;
      if (fabs(err_sum[u][v]) / NB > pk_me) pk_me = fabs(err_sum[u][v]) / NB;
    end
    $display("range %0d..%0d, %0d blocks: peak error %0d, worst coefficient MSE %f, overall MSE %f, worst coefficient mean %f, overall mean %f",
             lo, hi, NB, peak, pk_mse, tot_sq / (64.0 * NB), pk_me, fabs(tot_sum) / (64.0 * NB));
    checks++; if (peak > 1)                        failures++;
    checks++; if (pk_mse > 0.06)                   failures++;
    checks++; if (tot_sq / (64.0 * NB) > 0.02)     failures++;
    checks++; if (pk_me > 0.015)                   failures++;
    checks++; if (fabs(tot_sum) / (64.0 * NB) > 0.0015) failures++;
  endtask

  initial begin
    run_range(-256, 255);
    run_range(-5, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
