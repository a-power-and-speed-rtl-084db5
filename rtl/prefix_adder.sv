// prefix_adder - Kogge-Stone parallel-prefix adder.
//
// Each bit first forms its generate g = a & b and propagate p = a ^ b. The
// carry-in is folded into bit 0's generate. log2(W) prefix levels then
// combine group terms with
//   G[i:j] = G[i:k] | P[i:k] & G[k-1:j],   P[i:j] = P[i:k] & P[k-1:j]
// doubling the span each level, until every bit holds G[i:0]. The sum is
//   S[i] = p[i] ^ G[i-1:0]     (G[-1:0] being the carry-in)
// and the carry-out is G[W-1:0].
//
// The prefix equations and the sum equation follow the design description;
// the Kogge-Stone arrangement (every node at every level) is this
// implementation's choice of parallel-prefix tree.
//
// Purely combinational.
module prefix_adder #(
  parameter int unsigned W = 17,  // width, at least 2
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1  // prefix levels
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0]      p0;          // bit propagate, kept for the sum
  logic [L:0][W-1:0] g, p;        // group generate/propagate per level

  logic [W-1:1]      g_hi;        // bit generate above bit 0

  assign p0   = a ^ b;
  assign g_hi = a[W-1:1] & b[W-1:1];
  assign g[0] = {g_hi, (a[0] & b[0]) | (p0[0] & cin)};  // carry-in folded in
  assign p[0] = p0;

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_node
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-(1<<l)]);
        assign p[l+1][i] = p[l][i] & p[l][i-(1<<l)];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  assign s    = p0 ^ {g[L][W-2:0], cin};
  assign cout = g[L][W-1];

  // The top-level group propagate is not needed for any sum bit.
  logic unused_p;
  assign unused_p = ^p[L];

endmodule
