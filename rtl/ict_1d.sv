// 1-D J(10,9,6,2,3,1) processor: eight samples in, eight unnormalized ICT
// coefficients out, continuously, one sample and one coefficient per Clk1
// cycle.
//
// Structure (as in the chip): an input processor forms the sums a0..a3 and
// differences a7..a4 of mirrored sample pairs; the J4e processor turns the
// sums into the even coefficients and, in parallel, the J4o processor turns
// the differences into the odd coefficients; an output mixer puts them back
// in natural order at f_s.  The three processors run at f_s/2 (the Clk2
// enable ce2) and are stepped through the four slots of a vector period by
// the select signals M1 and M2.  No multipliers are used.
//
// Timing: sample x(n) of a vector must be presented in the Clk1 cycle where
// the sample counter {m2, m1, ~ce2} equals n.  Coefficient Y(k) of that
// vector leaves y in the cycle where the counter equals k, 40 Clk1
// cycles (five vector periods) after x(k) went in.  The output is W_IN + 7
// bits wide: the worst-case gain of a kernel row is 54, so six bits of
// growth would do; seven follow the growth of the add/shift network.
module ict_1d #(
  parameter int W_IN  = 9,
  parameter int W_OUT = W_IN + 7
) (
  input  logic             clk,
  input  logic             ce2,
  input  logic             m1,
  input  logic             m2,
  input  logic [W_IN-1:0]  x,
  output logic [W_OUT-1:0] y
);

  logic [1:0] sel, ph;
  assign sel = {m2, m1};
  assign ph  = sel - 2'd1;   // slot phase of the J4e/J4o schedules

  logic [W_OUT-1:0] a_even, a_odd;
  logic [W_OUT-1:0] y_even [4];
  logic [W_OUT-1:0] y_odd  [4];

  ict_input_proc #(.W_IN(W_IN), .W_OUT(W_OUT)) u_in (
    .clk, .ce2, .sel, .x, .a_even, .a_odd
  );

  ict_j4e #(.W(W_OUT)) u_j4e (
    .clk, .ce2, .ph, .a_in(a_even),
    .y0(y_even[0]), .y2(y_even[1]), .y4(y_even[2]), .y6(y_even[3])
  );

  ict_j4o #(.W(W_OUT)) u_j4o (
    .clk, .ce2, .ph, .a_in(a_odd),
    .y1(y_odd[0]), .y3(y_odd[1]), .y5(y_odd[2]), .y7(y_odd[3])
  );

  ict_out_mixer #(.W(W_OUT)) u_mix (
    .clk, .load(ce2 && sel == 2'd3), .idx({m2, m1, ~ce2}),
    .y_even, .y_odd, .y_out(y)
  );

endmodule
