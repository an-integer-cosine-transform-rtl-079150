// Output mixer of the 1-D ICT processor.
//
// The J4e processor delivers Y0, Y2, Y4, Y6 and the J4o processor Y1, Y3,
// Y5, Y7, all at the Clk2 rate.  On the Clk2 edge of the last slot of a
// vector period (load = 1) the mixer copies the eight coefficients into a
// holding register; it then sends them out one per Clk1 cycle in natural
// order Y0, Y1, ..., Y7 through an 8:1 multiplexer and an output register,
// which restores the sample rate f_s.  The holding register plus output
// register structure is this design's own; the chip's mixer is only
// described by its function.
//
// Timing: idx is the Clk1 sample counter {M2, M1, Clk1 phase}.  Coefficient
// Y_k leaves y_out in the cycle where idx == k; a vector loaded in the cycle
// idx == 6 comes out during the next eight cycles (idx = 0..7).
module ict_out_mixer #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         load,
  input  logic [2:0]   idx,
  input  logic [W-1:0] y_even [4],   // Y0, Y2, Y4, Y6
  input  logic [W-1:0] y_odd  [4],   // Y1, Y3, Y5, Y7
  output logic [W-1:0] y_out
);

  logic [W-1:0] hold [8];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int i = 0; i < 4; i++) begin
        hold[2*i]     <= y_even[i];
        hold[2*i + 1] <= y_odd[i];
      end
    end
    y_out <= hold[idx + 3'd1];
  end

endmodule
