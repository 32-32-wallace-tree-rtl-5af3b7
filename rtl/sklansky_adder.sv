// sklansky_adder: W-bit Sklansky (divide-and-conquer) parallel-prefix adder,
// the final carry-propagate stage of the multiplier.
// sum = a + b + cin (mod 2^W), cout = carry out of bit W-1. Combinational.
// Bit-level generate/propagate g = a&b, p = a^b (cin is folded into g[0]).
// At prefix level l (l = 0 .. log2(W)-1) every bit i whose bit l is 1 combines
// its group (G,P) with that of bit ((i >> l) << l) - 1, the top bit of the
// lower half of its 2^(l+1)-bit block:
//   G[i] = G[i] | P[i] & G[j],  P[i] = P[i] & P[j].
// After log2(W) levels G[i] is the carry out of bits i..0, and
// sum[i] = p[i] ^ G[i-1]. Depth log2(W) prefix cells, with fan-out growing
// to W/2 at the last level (the Sklansky trade of wiring for depth).
// The reference design picks the Sklansky adder for speed; its cell-level structure
// here is the standard one. W need not be a power of two.
module sklansky_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p0, g0;
  always_comb begin
    p0 = a ^ b;
    g0 = a & b;
    g0[0] = g0[0] | (p0[0] & cin);
  end

  for (genvar l = 0; l <= L; l++) begin : g_lvl
    logic [W-1:0] gg, pp;
    if (l == 0) begin : g_init
      assign gg = g0;
      assign pp = p0;
    end else begin : g_comb
      for (genvar i = 0; i < W; i++) begin : g_bit
        localparam int unsigned J = ((i >> (l - 1)) << (l - 1)) - 1;
        if (((i >> (l - 1)) & 1) == 1) begin : g_cell
          assign gg[i] = g_lvl[l-1].gg[i] | (g_lvl[l-1].pp[i] & g_lvl[l-1].gg[J]);
          assign pp[i] = g_lvl[l-1].pp[i] & g_lvl[l-1].pp[J];
        end else begin : g_pass
          assign gg[i] = g_lvl[l-1].gg[i];
          assign pp[i] = g_lvl[l-1].pp[i];
        end
      end
    end
  end

  logic [W-1:0] gfin;
  assign gfin = g_lvl[L].gg;

  always_comb begin
    sum  = p0 ^ {gfin[W-2:0], cin};
    cout = gfin[W-1];
  end
endmodule
