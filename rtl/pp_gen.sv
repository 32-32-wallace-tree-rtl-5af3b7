// pp_gen: partial-product generator (AND array). Row j is the multiplicand
// ANDed with multiplier bit j: pp[j][i] = a[i] & b[j], with weight 2^(i+j).
// Rows are left unshifted; the reduction tree places row j at column j.
// Combinational. Unsigned operands; the AND array (rather than Booth
// recoding) is this design's choice of the two options the reference design lists.
module pp_gen #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] pp [N]
);
  always_comb begin
    for (int j = 0; j < N; j++) pp[j] = a & {N{b[j]}};
  end
endmodule
