// comp4_2: 4:2 compressor. Adds four bits of one column and a lateral carry
// in: x[0]+x[1]+x[2]+x[3]+cin = sum + 2*(carry + cout). Combinational.
// cout is the majority of x[0..2] and never depends on cin, so a row of these
// compressors with cout(i) feeding cin(i+1) has no carry ripple. carry is a
// multiplexer: it selects cin when x[3] ^ (x[0]^x[1]^x[2]) is 1, else x[3].
// This is the common XOR/MUX form; the multiplier description only names
// the 4:2 compressor.
module comp4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1, t;
  always_comb begin
    s1    = x[0] ^ x[1] ^ x[2];
    cout  = (x[0] & x[1]) | (x[1] & x[2]) | (x[0] & x[2]);
    t     = s1 ^ x[3];
    sum   = t ^ cin;
    carry = t ? cin : x[3];
  end
endmodule
