// Input processor of the 1-D ICT: first computing level of the flow graph.
//
// Samples x(0..7) of a vector arrive one per Clk1 cycle and shift into an
// 11-stage register.  Once x(7) is in, two 4:1 multiplexers pick the pair
// x(k), x(7-k) for k = 0..3, one pair per Clk2 slot, selected by {M2,M1}.
// A pipelined adder forms a(k) = x(k) + x(7-k) (the even sequence a0..a3)
// and a pipelined subtracter, in parallel, forms a(7-k) = x(k) - x(7-k) (the
// odd sequence a7, a6, a5, a4).  Both units are busy in every Clk2 slot.
//
// Timing: with sample x(n) presented in the Clk1 cycle where the sample
// counter equals n, pair k is taken from the register in slot k of the next
// vector (x(k) sits in stage 7+k, x(7-k) in stage 3k) and a_even/a_odd carry
// the result during slot k+1, ready to be shifted into the next processor's
// input register on that slot's ce2 edge.  Outputs are sign-extended to
// W_OUT bits, the working width of the J4e/J4o processors.
module ict_input_proc #(
  parameter int W_IN  = 9,
  parameter int W_OUT = W_IN + 7
) (
  input  logic             clk,
  input  logic             ce2,
  input  logic [1:0]       sel,        // {M2, M1}: pair index k
  input  logic [W_IN-1:0]  x,
  output logic [W_OUT-1:0] a_even,     // a0..a3
  output logic [W_OUT-1:0] a_odd       // a7..a4
);

  localparam int WA = W_IN + 1;

  logic [W_IN-1:0] sr [11];
  always_ff @(posedge clk) begin
    sr[0] <= x;
    for (int i = 1; i < 11; i++) sr[i] <= sr[i-1];
  end

  logic [W_IN-1:0] mux_hi, mux_lo;   // x(k) and x(7-k)
  always_comb begin
    mux_hi = sr[7 + int'(sel)];
    mux_lo = sr[3 * int'(sel)];
  end

  logic [WA-1:0] op_hi, op_lo, sum, dif;
  assign op_hi = {mux_hi[W_IN-1], mux_hi};
  assign op_lo = {mux_lo[W_IN-1], mux_lo};

  bcl_addsub #(.W(WA)) u_add (.clk, .ce(ce2), .a(op_hi), .b(op_lo), .sub(1'b0), .y(sum));
  bcl_addsub #(.W(WA)) u_sub (.clk, .ce(ce2), .a(op_hi), .b(op_lo), .sub(1'b1), .y(dif));

  assign a_even = W_OUT'(signed'(sum));
  assign a_odd  = W_OUT'(signed'(dif));

endmodule
