// wallace_mult32: 32x32-bit unsigned multiplier, p = a * b (64 bits).
// Fully combinational, no clock: the product is valid one propagation delay
// after the operands change. Three stages:
//   pp_gen          AND array, 32 partial-product rows
//   wallace_tree32  7:2 / 6:2 / 5:2 / 3:2 / 4:2 compressor tree with the
//                   upper/lower input partitioning, down to two rows
//   sklansky_adder  64-bit parallel-prefix adder for the final addition
// The structure follows the reference design; unsigned operands and the exact row
// assignment of the tree are this design's choices.
module wallace_mult32
  import mult_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_rows_t pp;
  product_t row_s, row_c;
  logic     unused_cout;

  pp_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  wallace_tree32 #(.N(N)) u_tree (.pp(pp), .row_s(row_s), .row_c(row_c));

  // The carry out of bit 63 is always 0: a*b < 2^64.
  sklansky_adder #(.W(W)) u_cpa (
    .a(row_s), .b(row_c), .cin(1'b0), .sum(p), .cout(unused_cout));
endmodule
