// comp7_2: 7:2 compressor with full-adder internal carry generation.
// y[0..6] + cin1 + cin2 = sum + 2*carry + 2*cout1 + 4*cout2. Combinational.
// cout1 goes to column i+1 and cout2 to column i+2.
// Internal carries, as in the reference design's equations:
//   CTEMP1 = maj(y0,y1,y2),  CTEMP2 = maj(y3,y4,y5)
//   CTEMP3 = maj(y0^y1^y2, y3^y4^y5, y6)
//   cout1  = CTEMP1^CTEMP2^CTEMP3,  cout2 = maj(CTEMP1,CTEMP2,CTEMP3)
// Four full adders build this: two on the column bits, one merging their
// sums with y6 (its carry is CTEMP3, its sum is X = y0^..^y6) and one on the
// three temporaries. cout1/cout2 never depend on cin1/cin2.
//   sum    = X^cin1^cin2,  carry = (X^cin1) ? cin2 : X
module comp7_2 (
  input  logic [6:0] y,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, ct1, s2, ct2, ct3, x, xc;

  fa u_fa_a (.a(y[0]), .b(y[1]), .c(y[2]), .s(s1), .co(ct1));
  fa u_fa_b (.a(y[3]), .b(y[4]), .c(y[5]), .s(s2), .co(ct2));
  fa u_fa_m (.a(s1),   .b(s2),   .c(y[6]), .s(x),  .co(ct3));
  fa u_fa_c (.a(ct1),  .b(ct2),  .c(ct3),  .s(cout1), .co(cout2));

  always_comb begin
    xc    = x ^ cin1;
    sum   = xc ^ cin2;
    carry = xc ? cin2 : x;
  end
endmodule
