// fa_row: one row of 3:2 compressors (full adders, carry-save adder) over
// W columns: a + b + c = sum + carry (mod 2^W), carry already shifted left by
// one column. No carry passes between columns. Combinational.
module fa_row #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] co;
  for (genvar i = 0; i < W; i++) begin : g_col
    fa u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(sum[i]), .co(co[i]));
  end
  assign carry = {co[W-2:0], 1'b0};
endmodule
