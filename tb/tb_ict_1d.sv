// Self-checking test of the 1-D ICT processor, at the two sizes the 2-D
// processor uses: 9-bit samples (row pass) and 16-bit samples (column pass).
// Random vectors, plus extreme ones, stream in back to back; every output
// coefficient is compared with the direct product by the 8x8 kernel, and it
// must appear exactly 40 cycles after the sample with the same index, in
// natural order.  The Clk2 enable and the M1/M2 selects come from a cycle
// counter kept here.
module tb_ict_1d;
  import ict_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NV  = 200;
  localparam int LAT = 40;

  logic        ce2, m1, m2;
  logic [8:0]  xa;
  logic [15:0] ya;
  logic [15:0] xb;
  logic [22:0] yb;

  ict_1d #(.W_IN(9))  dut_a (.clk, .ce2, .m1, .m2, .x(xa), .y(ya));
  ict_1d #(.W_IN(16)) dut_b (.clk, .ce2, .m1, .m2, .x(xb), .y(yb));

  longint sa [NV][8];
  longint sb [NV][8];
  longint ra [NV][8];
  longint rb [NV][8];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < NV; v++) begin
      for (int n = 0; n < 8; n++) begin
        sa[v][n] = longint'($urandom_range(0, 511)) - 256;
        sb[v][n] = longint'($urandom_range(0, 65535)) - 32768;
        if (v == 1) begin sa[v][n] = 255;  sb[v][n] = 32767;  end
        if (v == 2) begin sa[v][n] = -256; sb[v][n] = -32768; end
        if (v == 3) begin   // signs that maximize the odd rows
          sa[v][n] = (J[1][n] > 0) ? 255 : -256;
          sb[v][n] = (J[3][n] > 0) ? 32767 : -32768;
        end
      end
      ict1d(sa[v], ra[v]);
      ict1d(sb[v], rb[v]);
    end
    for (int c = 0; c < 8 * NV + LAT + 8; c++) begin
      @(negedge clk);
      ce2 = (c % 2 == 0);
      m1  = ((c / 2) % 2 == 1);
      m2  = ((c / 4) % 2 == 1);
      xa  = (c < 8 * NV) ? 9'(sa[c / 8][c % 8])  : '0;
      xb  = (c < 8 * NV) ? 16'(sb[c / 8][c % 8]) : '0;
      if (c >= LAT && (c - LAT) / 8 < NV) begin
        automatic int v = (c - LAT) / 8;
        automatic int k = (c - LAT) % 8;
        checks++;
        if (longint'($signed(ya)) != ra[v][k] || longint'($signed(yb)) != rb[v][k]) begin
          failures++;
          if (failures < 10)
            $display("vec %0d Y%0d: 9-bit got %0d exp %0d; 16-bit got %0d exp %0d",
                     v, k, $signed(ya), ra[v][k], $signed(yb), rb[v][k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
