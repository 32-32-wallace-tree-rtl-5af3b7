// comp4_2_row: one row of 4:2 compressors over W columns with lateral
// carries: cout of column i feeds cin of column i+1 (cin of column 0 is 0).
// x[0] + x[1] + x[2] + x[3] = sum + carry (mod 2^W), carry already shifted
// to its column. Because a 4:2 compressor's cout does not depend on its cin,
// the lateral carries do not ripple: the row's delay is that of one
// compressor. Combinational.
module comp4_2_row #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] x [4],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] c_col, co_col, cin;

  assign cin = {co_col[W-2:0], 1'b0};

  for (genvar i = 0; i < W; i++) begin : g_col
    comp4_2 u_c (.x({x[3][i], x[2][i], x[1][i], x[0][i]}), .cin(cin[i]),
                 .sum(sum[i]), .carry(c_col[i]), .cout(co_col[i]));
  end

  assign carry = {c_col[W-2:0], 1'b0};
endmodule
