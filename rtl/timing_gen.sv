// Timing generator: derives the internal clock phase and the multiplexer
// select signals of the ICT processor from the sample clock Clk1 (f_s).
//
// A 3-bit counter runs on Clk1 from reset.  Bit 0 gives Clk2 at f_s/2; here
// Clk2 is a clock enable, ce2, high on the even counter values, instead of a
// second clock net (this design's choice).  Bit 1 is M1 (f_s/4) and bit 2 is
// M2 (f_s/8), the two selection signals that step the 4:1 multiplexers of
// the processors through the four Clk2 slots of an 8-sample vector.
// After reset the counter is 0, so the first Clk1 cycle is sample 0 of a
// vector.
module timing_gen (
  input  logic       clk,
  input  logic       rst_n,
  output logic       ce2,
  output logic       m1,
  output logic       m2
);

  logic [2:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 3'd1;
  end

  assign ce2 = ~cnt[0];
  assign m1  = cnt[1];
  assign m2  = cnt[2];

endmodule
