// Pipelined look-ahead-carry adder/subtracter: the arithmetic element (AE)
// used everywhere in the ICT processor.
//
// The carries come from a parallel-prefix (binary look-ahead) tree of
// generate/propagate pairs with ceil(log2 W) levels, so every input sees the
// same logic depth.  A pipeline register cuts the tree in the middle, as the
// chip does for all of its adders; the sum bits are formed after the
// register.  The prefix tree is of the Kogge-Stone form, this design's
// choice of look-ahead network.
//
// Interface: a, b and sub are sampled on a Clk1 edge where ce (the Clk2
// phase) is 1; y = a + b (sub = 0) or a - b (sub = 1), modulo 2^W, is valid
// from that edge until the next ce edge.  The caller registers y on that next
// ce edge, so an operation takes two Clk2 periods from operands to stored
// result.
module bcl_addsub #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         ce,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  localparam int L  = $clog2(W);   // prefix levels (W >= 2)
  localparam int LM = L / 2;                      // levels before the register

  logic [W-1:0] p0, g_pre, p_pre;

  // Bit generate/propagate and the first half of the prefix tree.
  always_comb begin
    logic [W-1:0] bx, g, p, gn, pn;
    bx = b ^ {W{sub}};
    p0 = a ^ bx;
    g  = a & bx;
    g[0] = g[0] | (p0[0] & sub);   // carry-in folded into bit 0
    p  = p0;
    for (int l = 0; l < LM; l++) begin
      gn = g;
      pn = p;
      for (int i = (1 << l); i < W; i++) begin
        gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
        pn[i] = p[i] & p[i - (1 << l)];
      end
      g = gn;
      p = pn;
    end
    g_pre = g;
    p_pre = p;
  end

  // Mid-tree pipeline register.
  logic [W-1:0] p0_q, g_q, p_q;
  logic         cin_q;
  always_ff @(posedge clk) begin
    if (ce) begin
      p0_q  <= p0;
      g_q   <= g_pre;
      p_q   <= p_pre;
      cin_q <= sub;
    end
  end

  // Second half of the prefix tree and the sum bits.
  always_comb begin
    logic [W-1:0] g, p, gn, pn;
    g = g_q;
    p = p_q;
    for (int l = LM; l < L; l++) begin
      gn = g;
      pn = p;
      for (int i = (1 << l); i < W; i++) begin
        gn[i] = g[i] | (p[i] & g[i - (1 << l)]);
        pn[i] = p[i] & p[i - (1 << l)];
      end
      g = gn;
      p = pn;
    end
    y = p0_q ^ {g[W-2:0], cin_q};
  end

endmodule
