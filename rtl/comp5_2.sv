// comp5_2: 5:2 compressor with the same carry interface as the 6:2 and 7:2
// compressors: y[0..4] + cin1 + cin2 = sum + 2*carry + 2*cout1 + 4*cout2.
// cin1 is normally cout1 of column i-1 and cin2 is cout2 of column i-2.
// Combinational.
// The internal carries follow the full-adder method used for the larger
// compressors: CTEMP1 = maj(y0,y1,y2), CTEMP2 = y3.y4 (a half adder, as the
// sixth input is missing), CTEMP3 = (y0^y1^y2).(y3^y4); cout1/cout2 are the
// sum and carry of a full adder on the three temporaries, so they depend on
// y only. sum/carry add X = y0^..^y4 to cin1 and cin2 with an XOR and a
// multiplexer. The reference design names the 5:2 compressor without giving its
// insides; this form is this design's choice.
module comp5_2 (
  input  logic [4:0] y,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, ct1, s2, ct2, ct3, x, xc;

  fa u_fa_a (.a(y[0]), .b(y[1]), .c(y[2]), .s(s1), .co(ct1));
  fa u_fa_t (.a(ct1), .b(ct2), .c(ct3), .s(cout1), .co(cout2));

  always_comb begin
    s2    = y[3] ^ y[4];
    ct2   = y[3] & y[4];
    ct3   = s1 & s2;
    x     = s1 ^ s2;
    xc    = x ^ cin1;
    sum   = xc ^ cin2;
    carry = xc ? cin2 : x;
  end
endmodule
