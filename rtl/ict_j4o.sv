// J4o processor: the odd half of the 1-D ICT(10,9,6,2,3,1).
//
// It multiplies (a7, a6, a5, a4) by the odd kernel
//   Y1 = 10a7 + 9a6 +  6a5 +  2a4     Y3 =  9a7 - 2a6 - 10a5 -  6a4
//   Y5 =  6a7 -10a6 +  2a5 +  9a4     Y7 =  2a7 - 6a6 +  9a5 - 10a4
// without multipliers, by splitting the kernel into a +-2 part, a +-8 part
// and a small correction (powers of two only), Y = 2*e + g:
//   d0 = a7 + a4, d2 = a6 + a5 (AE5)      d1 = a7 - a4, d3 = a5 - a6 (AE6)
//   e0 = d0 - d3, e3 = d1 + d2  (AE5)     e1 = d0 - d2, e2 = d3 - d1 (AE6)
//   f0 = a6 - 8a7, f2 = 8a6 + a4 (AE7)    f1 = a7 + 8a5, f3 = a5 + 8a4 (AE8)
//   g0 = 8d2 - f0, g2 = 8d0 - f2 (AE7)    g1 = 8d1 - f1, g3 = 8d3 - f3 (AE8)
//   Y(2i+1) = 2*e_i + g_i (AE9, in natural order Y1, Y3, Y5, Y7)
// The unit assignment (AE5 add/subtract, AE6 subtract, AE7/AE8 add/subtract,
// AE9 add), the registers SRA2, SRD1 (AE5), SRD2 (AE6), SRF1 (AE7), SRF2
// (AE8) and the use of wired shifts follow the chip; the exact split of the
// kernel into d, e, f, g terms and the slot schedule are this design's own.
// All five units do four operations per 4-slot period.
//
// Every register shifts on each Clk2 edge; a result of an operation started
// in slot t is in position k of its register in slot t+2+k.  Schedule (t = 0
// is the slot in which a4 is in SRA2[0]):
//   AE5: t=-1 d2, t=0 d0, t=2 e0, t=5 e3
//   AE6: t=-1 d3, t=0 d1, t=2 e1, t=5 e2
//   AE7: t=-2 f0, t=0 f2, t=1 g0, t=3 g2
//   AE8: t=-1 f1, t=0 f3, t=2 g1, t=5 g3
//   AE9: t=5 Y1, t=6 Y3, t=7 Y5, t=8 Y7
//
// Interface: a_in is shifted into SRA2 on every ce2 edge; ph is t mod 4.
// y1..y7 are taps holding the vector's odd coefficients during slot t = 10
// (ph = 2).
module ict_j4o #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         ce2,
  input  logic [1:0]   ph,
  input  logic [W-1:0] a_in,
  output logic [W-1:0] y1,
  output logic [W-1:0] y3,
  output logic [W-1:0] y5,
  output logic [W-1:0] y7
);

  logic [W-1:0] sra2 [4];
  logic [W-1:0] srd1 [5];
  logic [W-1:0] srd2 [5];
  logic [W-1:0] srf1 [3];
  logic [W-1:0] srf2 [4];
  logic [W-1:0] sry  [4];

  function automatic logic [W-1:0] x2(input logic [W-1:0] v);
    return v << 1;
  endfunction
  function automatic logic [W-1:0] x8(input logic [W-1:0] v);
    return v << 3;
  endfunction

  logic [W-1:0] ae5_a, ae5_b, ae6_a, ae6_b, ae7_a, ae7_b, ae8_a, ae8_b, ae9_a, ae9_b;
  logic         ae5_s, ae7_s, ae8_s;
  logic [W-1:0] ae5_y, ae6_y, ae7_y, ae8_y, ae9_y;

  always_comb begin
    unique case (ph)
      2'd3: begin   // t = -1 (and 3)
        ae5_a = sra2[1];     ae5_b = sra2[0];    ae5_s = 1'b0;   // d2 = a6 + a5
        ae6_a = sra2[0];     ae6_b = sra2[1];                    // d3 = a5 - a6
        ae7_a = x8(srd1[1]); ae7_b = srf1[1];    ae7_s = 1'b1;   // g2 = 8d0 - f2
        ae8_a = sra2[2];     ae8_b = x8(sra2[0]); ae8_s = 1'b0;  // f1 = a7 + 8a5
        ae9_a = x2(srd2[0]); ae9_b = srf1[2];                    // Y5 = 2e2 + g2
      end
      2'd0: begin   // t = 0
        ae5_a = sra2[3];     ae5_b = sra2[0];    ae5_s = 1'b0;   // d0 = a7 + a4
        ae6_a = sra2[3];     ae6_b = sra2[0];                    // d1 = a7 - a4
        ae7_a = x8(sra2[2]); ae7_b = sra2[0];    ae7_s = 1'b0;   // f2 = 8a6 + a4
        ae8_a = sra2[1];     ae8_b = x8(sra2[0]); ae8_s = 1'b0;  // f3 = a5 + 8a4
        ae9_a = x2(srd1[1]); ae9_b = srf2[1];                    // Y7 = 2e3 + g3
      end
      2'd1: begin   // t = 1 and 5
        ae5_a = srd2[3];     ae5_b = srd1[4];    ae5_s = 1'b0;   // e3 = d1 + d2
        ae6_a = srd2[4];     ae6_b = srd2[3];                    // e2 = d3 - d1
        ae7_a = x8(srd1[0]); ae7_b = srf1[1];    ae7_s = 1'b1;   // g0 = 8d2 - f0
        ae8_a = x8(srd2[4]); ae8_b = srf2[3];    ae8_s = 1'b1;   // g3 = 8d3 - f3
        ae9_a = x2(srd1[1]); ae9_b = srf1[2];                    // Y1 = 2e0 + g0
      end
      default: begin // t = 2 (and -2)
        ae5_a = srd1[0];     ae5_b = srd2[1];    ae5_s = 1'b1;   // e0 = d0 - d3
        ae6_a = srd1[0];     ae6_b = srd1[1];                    // e1 = d0 - d2
        ae7_a = sra2[0];     ae7_b = x8(sra2[1]); ae7_s = 1'b1;  // f0 = a6 - 8a7
        ae8_a = x8(srd2[0]); ae8_b = srf2[1];    ae8_s = 1'b1;   // g1 = 8d1 - f1
        ae9_a = x2(srd2[2]); ae9_b = srf2[2];                    // Y3 = 2e1 + g1
      end
    endcase
  end

  bcl_addsub #(.W(W)) u_ae5 (.clk, .ce(ce2), .a(ae5_a), .b(ae5_b), .sub(ae5_s), .y(ae5_y));
  bcl_addsub #(.W(W)) u_ae6 (.clk, .ce(ce2), .a(ae6_a), .b(ae6_b), .sub(1'b1),  .y(ae6_y));
  bcl_addsub #(.W(W)) u_ae7 (.clk, .ce(ce2), .a(ae7_a), .b(ae7_b), .sub(ae7_s), .y(ae7_y));
  bcl_addsub #(.W(W)) u_ae8 (.clk, .ce(ce2), .a(ae8_a), .b(ae8_b), .sub(ae8_s), .y(ae8_y));
  bcl_addsub #(.W(W)) u_ae9 (.clk, .ce(ce2), .a(ae9_a), .b(ae9_b), .sub(1'b0),  .y(ae9_y));

  always_ff @(posedge clk) begin
    if (ce2) begin
      sra2[0] <= a_in;
      srd1[0] <= ae5_y;
      srd2[0] <= ae6_y;
      srf1[0] <= ae7_y;
      srf2[0] <= ae8_y;
      sry[0]  <= ae9_y;
      for (int i = 1; i < 4; i++) sra2[i] <= sra2[i-1];
      for (int i = 1; i < 5; i++) srd1[i] <= srd1[i-1];
      for (int i = 1; i < 5; i++) srd2[i] <= srd2[i-1];
      for (int i = 1; i < 3; i++) srf1[i] <= srf1[i-1];
      for (int i = 1; i < 4; i++) srf2[i] <= srf2[i-1];
      for (int i = 1; i < 4; i++) sry[i]  <= sry[i-1];
    end
  end

  assign y1 = sry[3];
  assign y3 = sry[2];
  assign y5 = sry[1];
  assign y7 = sry[0];

endmodule
