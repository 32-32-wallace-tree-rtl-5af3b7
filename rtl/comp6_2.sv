// comp6_2: 6:2 compressor with full-adder internal carry generation.
// y[0..5] + cin1 + cin2 = sum + 2*carry + 2*cout1 + 4*cout2. Combinational.
// cout1 goes to column i+1 (its cin1) and cout2 to column i+2 (its cin2).
// Internal carries (the faster of the two methods the design considers):
//   CTEMP1 = maj(y0,y1,y2)              full adder A
//   CTEMP2 = maj(y3,y4,y5)              full adder B
//   CTEMP3 = (y0^y1^y2).(y3^y4^y5)
//   cout1  = CTEMP1^CTEMP2^CTEMP3,  cout2 = maj(CTEMP1,CTEMP2,CTEMP3)
//                                        full adder C
// so cout1/cout2 depend on the six column bits only, never on cin1/cin2.
//   sum    = y0^..^y5^cin1^cin2
//   carry  = (X^cin1) ? cin2 : X        with X = y0^..^y5
// These are the reference design's equations; the multiplexer form of carry is the
// reading in which the arithmetic identity above holds.
module comp6_2 (
  input  logic [5:0] y,
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
  fa u_fa_c (.a(ct1), .b(ct2), .c(ct3), .s(cout1), .co(cout2));

  always_comb begin
    ct3   = s1 & s2;
    x     = s1 ^ s2;
    xc    = x ^ cin1;
    sum   = xc ^ cin2;
    carry = xc ? cin2 : x;
  end
endmodule
