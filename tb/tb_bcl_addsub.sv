// Self-checking test of the pipelined look-ahead adder/subtracter.
// Two instances (16 and 23 bits) get random operands and a random
// add/subtract choice on every enabled edge, with the enable toggling like
// the Clk2 phase and also held low at random; each result is compared with
// a + b or a - b computed here, in the cycle before the next enabled edge
// (two Clk2 periods from operands to a stored result).
module tb_bcl_addsub;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        ce;
  logic [15:0] a16, b16, y16, e16;
  logic [22:0] a23, b23, y23, e23;
  logic        s16, s23;

  bcl_addsub #(.W(16)) dut16 (.clk, .ce, .a(a16), .b(b16), .sub(s16), .y(y16));
  bcl_addsub #(.W(23)) dut23 (.clk, .ce, .a(a23), .b(b23), .sub(s23), .y(y23));

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit have = 0;
    ce = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // check the result of the previous enabled edge
      if (have && ce) begin
        checks++;
        if (y16 !== e16 || y23 !== e23) begin
          failures++;
          if (failures < 10) $display("mismatch: y16=%h exp %h  y23=%h exp %h", y16, e16, y23, e23);
        end
      end
      ce = (i % 2 == 0) ? 1'b1 : ($urandom_range(0, 3) == 0);
      if (ce) begin
        a16 = 16'($urandom); b16 = 16'($urandom); s16 = 1'($urandom);
        a23 = 23'($urandom); b23 = 23'($urandom); s23 = 1'($urandom);
        // corner operands now and then
        if (i % 17 == 0) begin a16 = 16'hffff; b16 = 16'h0001; end
        if (i % 19 == 0) begin a23 = 23'h0; b23 = 23'h1; s23 = 1'b1; end
        e16 = s16 ? a16 - b16 : a16 + b16;
        e23 = s23 ? a23 - b23 : a23 + b23;
        have = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
