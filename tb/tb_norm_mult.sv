// Self-checking test of the normalization multiplier.  Random coefficients
// with random frequencies (u, v) and a random normalize/bypass choice go in
// every cycle; three cycles later the output must be either the input
// unchanged or round(Y * k_u * k_v) saturated to 12 bits, with k_u taken
// from the kernel row norms computed here in floating point.  Large inputs
// exercise the saturation in both directions.
module tb_norm_mult;
  import ict_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N   = 3000;
  localparam int LAT = 3;

  logic        norm_en;
  logic [2:0]  u, v;
  logic [22:0] y_in, y_out;

  norm_mult dut (.clk, .norm_en, .u, .v, .y_in, .y_out);

  longint ys [N];
  int     us [N], vs [N];
  bit     ens [N];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sat = 0;
    for (int i = 0; i < N; i++) begin
      ys[i]  = longint'($urandom_range(0, 2 * 746496)) - 746496;   // 2-D range
      if (i % 10 == 0) ys[i] = longint'($urandom_range(0, 8388607)) - 4194304;
      us[i]  = $urandom_range(0, 7);
      vs[i]  = $urandom_range(0, 7);
      ens[i] = 1'($urandom);
    end
    for (int c = 0; c < N + LAT; c++) begin
      @(negedge clk);
      if (c < N) begin
        y_in = 23'(ys[c]); u = 3'(us[c]); v = 3'(vs[c]); norm_en = ens[c];
      end
      if (c >= LAT) begin
        automatic int i = c - LAT;
        automatic longint e = ens[i] ? normalize(ys[i], us[i], vs[i]) : ys[i];
        if (ens[i] && (e == 2047 || e == -2048)) sat++;
        checks++;
        if (longint'($signed(y_out)) != e) begin
          failures++;
          if (failures < 10) $display("i=%0d y=%0d u=%0d v=%0d en=%0d: got %0d exp %0d",
                                      i, ys[i], us[i], vs[i], ens[i], $signed(y_out), e);
        end
      end
    end
    checks++;
    if (sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
