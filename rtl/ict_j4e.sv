// J4e processor: the even half of the 1-D ICT(10,9,6,2,3,1).
//
// From a0..a3 it computes the unnormalized even coefficients
//   b0 = a0 + a3, b1 = a1 + a2, b3 = a0 - a3, b2 = a1 - a2,
//   Y0 = b0 + b1, Y4 = b0 - b1, Y2 = 3*b3 + b2, Y6 = b3 - 3*b2,
// i.e. rows (1,1,1,1), (1,-1,-1,1), (3,1,-1,-3), (1,-3,3,-1) of the kernel.
// The hardware is the one of the chip: an input shift register SRA1, an
// adder, a subtracter and a multiply-by-3 unit (2b + b, a wired shift and an
// add), each feeding its own shift register (SRB1, SRB2, SRB3), and operand
// multiplexers stepped by the slot phase.  The adder and the subtracter do
// four operations in each 4-slot period, so they are never idle.
//
// Every register shifts on each Clk2 edge (ce2), so a result produced by an
// operation started in slot t sits in position k of its shift register in
// slot t+2+k; the operand multiplexers select those positions.  The slot
// schedule, with t = 0 the slot in which a3 is in SRA1[0]:
//   adder:      t=-1 b1, t=0 b0, t=2 Y0, t=5 Y2
//   subtracter: t=-1 b2, t=0 b3, t=2 Y4, t=5 Y6
//   times 3:    t=1 3*b2, t=2 3*b3
// The exact schedule and register depths are this design's own.
//
// Interface: a_in is shifted into SRA1 on every ce2 edge; ph is t mod 4.
// y0..y6 are taps that hold the vector's four coefficients during slot
// t = 10 (ph = 2), where the output mixer picks them up.
module ict_j4e #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         ce2,
  input  logic [1:0]   ph,
  input  logic [W-1:0] a_in,
  output logic [W-1:0] y0,
  output logic [W-1:0] y2,
  output logic [W-1:0] y4,
  output logic [W-1:0] y6
);

  logic [W-1:0] sra1 [4];
  logic [W-1:0] srb1 [7];   // adder results
  logic [W-1:0] srb2 [7];   // subtracter results
  logic [W-1:0] srb3 [3];   // times-3 results

  logic [W-1:0] add_a, add_b, sub_a, sub_b, add_y, sub_y, mul_y;

  // Operand multiplexers (4:1), indexed by slot phase.
  always_comb begin
    unique case (ph)
      2'd3: begin                                   // b1, b2
        add_a = sra1[1]; add_b = sra1[0];
        sub_a = sra1[1]; sub_b = sra1[0];
      end
      2'd0: begin                                   // b0, b3
        add_a = sra1[3]; add_b = sra1[0];
        sub_a = sra1[3]; sub_b = sra1[0];
      end
      2'd2: begin                                   // Y0, Y4
        add_a = srb1[0]; add_b = srb1[1];
        sub_a = srb1[0]; sub_b = srb1[1];
      end
      default: begin                                // Y2, Y6
        add_a = srb3[1]; add_b = srb2[4];
        sub_a = srb2[3]; sub_b = srb3[2];
      end
    endcase
  end

  bcl_addsub #(.W(W)) u_add (.clk, .ce(ce2), .a(add_a), .b(add_b), .sub(1'b0), .y(add_y));
  bcl_addsub #(.W(W)) u_sub (.clk, .ce(ce2), .a(sub_a), .b(sub_b), .sub(1'b1), .y(sub_y));
  // Multiply by 3: (b << 1) + b on the newest subtracter result.
  bcl_addsub #(.W(W)) u_mul3 (.clk, .ce(ce2), .a({srb2[0][W-2:0], 1'b0}), .b(srb2[0]),
                              .sub(1'b0), .y(mul_y));

  always_ff @(posedge clk) begin
    if (ce2) begin
      sra1[0] <= a_in;
      srb1[0] <= add_y;
      srb2[0] <= sub_y;
      srb3[0] <= mul_y;
      for (int i = 1; i < 4; i++) sra1[i] <= sra1[i-1];
      for (int i = 1; i < 7; i++) srb1[i] <= srb1[i-1];
      for (int i = 1; i < 7; i++) srb2[i] <= srb2[i-1];
      for (int i = 1; i < 3; i++) srb3[i] <= srb3[i-1];
    end
  end

  assign y0 = srb1[6];
  assign y2 = srb1[3];
  assign y4 = srb2[6];
  assign y6 = srb2[3];

endmodule
