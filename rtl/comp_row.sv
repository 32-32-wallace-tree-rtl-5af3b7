// comp_row: one row of K:2 compressors (K = 5, 6 or 7) spanning W columns.
// Column i gets bit i of each of the K input rows y[0..K-1] and the two
// carry-in rows cin1[i], cin2[i]. The outputs are rows again, each already
// shifted to the column it belongs to:
//   sum[i]   = SUM   of column i
//   carry[i] = CARRY of column i-1     (weight 2)
//   cout1[i] = COUT1 of column i-1     (weight 2)
//   cout2[i] = COUT2 of column i-2     (weight 4)
// so that  sum(y) + cin1 + cin2 = sum + carry + cout1 + cout2  (mod 2^W).
// Bits shifted out past column W-1 are dropped, which is exact modulo 2^W.
// Feeding cout1/cout2 of one row into cin1/cin2 of the next row gives the
// carry path "from column i-1 and column i-2"; feeding extra partial-product
// rows into cin1/cin2 makes the row take all K+2 bits from its own column.
// Combinational.
module comp_row #(
  parameter int unsigned K = 7,
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] y [K],
  input  logic [W-1:0] cin1,
  input  logic [W-1:0] cin2,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry,
  output logic [W-1:0] cout1,
  output logic [W-1:0] cout2
);
  logic [W-1:0] c_col, co1_col, co2_col;

  for (genvar i = 0; i < W; i++) begin : g_col
    logic [K-1:0] ycol;
    for (genvar k = 0; k < K; k++) begin : g_bit
      assign ycol[k] = y[k][i];
    end
    if (K == 7) begin : g_c7
      comp7_2 u_c (.y(ycol), .cin1(cin1[i]), .cin2(cin2[i]), .sum(sum[i]),
                   .carry(c_col[i]), .cout1(co1_col[i]), .cout2(co2_col[i]));
    end else if (K == 6) begin : g_c6
      comp6_2 u_c (.y(ycol), .cin1(cin1[i]), .cin2(cin2[i]), .sum(sum[i]),
                   .carry(c_col[i]), .cout1(co1_col[i]), .cout2(co2_col[i]));
    end else begin : g_c5
      comp5_2 u_c (.y(ycol[4:0]), .cin1(cin1[i]), .cin2(cin2[i]), .sum(sum[i]),
                   .carry(c_col[i]), .cout1(co1_col[i]), .cout2(co2_col[i]));
    end
  end

  always_comb begin
    carry = {c_col[W-2:0], 1'b0};
    cout1 = {co1_col[W-2:0], 1'b0};
    cout2 = {co2_col[W-3:0], 2'b00};
  end

  initial begin
    assert (K >= 5 && K <= 7) else $error("comp_row: K must be 5, 6 or 7");
  end
endmodule
