// fa: 3:2 compressor (full adder), the smallest counter of the reduction
// tree. a + b + c = s + 2*co. Purely combinational.
// s is the three-input XOR and co the majority function. The multiplier
// uses it on its own in 3:2 rows and three or four times inside each 6:2 and
// 7:2 compressor, where it forms the internal carry logic.
module fa (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (b & c) | (a & c);
  end
endmodule
