// wallace_tree32: compressor tree that reduces the 32 partial-product rows
// of a 32x32 multiplication to two 64-bit rows whose sum is the product.
// Combinational; pp[j] is the unshifted AND-array row j (weight 2^j), and
// row_s + row_c = sum_j pp[j] * 2^j (mod 2^64).
//
// Input partitioning: each stage is split into chains of compressor rows.
// The first (upper) row of a chain takes all of its inputs from its own
// column, using the two carry-in pins for two more partial-product bits, so
// a 7:2 compressor there adds 9 same-column bits and waits for nothing. The
// rows below it (lower rows) take cin1/cin2 from the cout1/cout2 of the row
// above, i.e. from columns i-1 and i-2. Since a compressor's couts depend
// only on its own column bits, no carry ripples along a chain; the couts of
// the last row of a chain are passed on to the next stage as two more rows.
//
//   stage 1, 32 -> 12 rows  chain 7:2 (rows 0-8, upper) -> 7:2 (9-15)
//                           -> 7:2 (16-22) -> 6:2 (23-28);
//                           3:2 row on rows 29-31
//   stage 2, 12 -> 6 rows   chain 5:2 (rows 0-6, upper) -> 5:2 (7-11)
//   stage 3,  6 -> 4 rows   two 3:2 rows
//   stage 4,  4 -> 2 rows   4:2 row with lateral carries
//
// The compressor types, their equations and the upper/lower partitioning
// follow the reference design; the number of stages and which rows go to
// which compressor are this design's own choice.
module wallace_tree32 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   pp [N],
  output logic [2*N-1:0] row_s,
  output logic [2*N-1:0] row_c
);
  localparam int unsigned WW = 2 * N;

  // Partial-product rows placed at their columns.
  logic [WW-1:0] r0 [N];
  always_comb begin
    for (int j = 0; j < N; j++) r0[j] = WW'(pp[j]) << j;
  end

  // ---------------- stage 1: 32 -> 12 ----------------
  logic [WW-1:0] s1a, c1a, o1a1, o1a2;
  logic [WW-1:0] s1b, c1b, o1b1, o1b2;
  logic [WW-1:0] s1c, c1c, o1c1, o1c2;
  logic [WW-1:0] s1d, c1d, o1d1, o1d2;
  logic [WW-1:0] s1e, c1e;

  comp_row #(.K(7), .W(WW)) u_s1_upper (
    .y(r0[0:6]), .cin1(r0[7]), .cin2(r0[8]),
    .sum(s1a), .carry(c1a), .cout1(o1a1), .cout2(o1a2));
  comp_row #(.K(7), .W(WW)) u_s1_low1 (
    .y(r0[9:15]), .cin1(o1a1), .cin2(o1a2),
    .sum(s1b), .carry(c1b), .cout1(o1b1), .cout2(o1b2));
  comp_row #(.K(7), .W(WW)) u_s1_low2 (
    .y(r0[16:22]), .cin1(o1b1), .cin2(o1b2),
    .sum(s1c), .carry(c1c), .cout1(o1c1), .cout2(o1c2));
  comp_row #(.K(6), .W(WW)) u_s1_low3 (
    .y(r0[23:28]), .cin1(o1c1), .cin2(o1c2),
    .sum(s1d), .carry(c1d), .cout1(o1d1), .cout2(o1d2));
  fa_row #(.W(WW)) u_s1_fa (
    .a(r0[29]), .b(r0[30]), .c(r0[31]), .sum(s1e), .carry(c1e));

  logic [WW-1:0] r1 [12];
  assign r1 = '{s1a, c1a, s1b, c1b, s1c, c1c, s1d, c1d, o1d1, o1d2, s1e, c1e};

  // ---------------- stage 2: 12 -> 6 ----------------
  logic [WW-1:0] s2a, c2a, o2a1, o2a2;
  logic [WW-1:0] s2b, c2b, o2b1, o2b2;

  comp_row #(.K(5), .W(WW)) u_s2_upper (
    .y(r1[0:4]), .cin1(r1[5]), .cin2(r1[6]),
    .sum(s2a), .carry(c2a), .cout1(o2a1), .cout2(o2a2));
  comp_row #(.K(5), .W(WW)) u_s2_low1 (
    .y(r1[7:11]), .cin1(o2a1), .cin2(o2a2),
    .sum(s2b), .carry(c2b), .cout1(o2b1), .cout2(o2b2));

  // ---------------- stage 3: 6 -> 4 ----------------
  logic [WW-1:0] s3a, c3a, s3b, c3b;

  fa_row #(.W(WW)) u_s3_fa0 (.a(s2a), .b(c2a), .c(s2b), .sum(s3a), .carry(c3a));
  fa_row #(.W(WW)) u_s3_fa1 (.a(c2b), .b(o2b1), .c(o2b2), .sum(s3b), .carry(c3b));

  // ---------------- stage 4: 4 -> 2 ----------------
  comp4_2_row #(.W(WW)) u_s4 (
    .x('{s3a, c3a, s3b, c3b}), .sum(row_s), .carry(row_c));

  initial begin
    assert (N == mult_pkg::N) else $error("wallace_tree32: tree is laid out for N = 32");
  end
endmodule
