// tb_wallace_mult32: end-to-end test of the 32x32 multiplier at its only
// size. Products are compared with the simulator's 64-bit multiply for
// corner operands (0, 1, all ones, single bits, alternating patterns), a
// walking-one sweep and random operands. The test counts how often each
// mechanism of the design is exercised and fails if one never is:
//   - a 9-input upper compressor row passes carries to the row below,
//   - the last row of the stage-1 chain hands its couts to stage 2,
//   - the 4:2 row moves a lateral carry between columns,
//   - the Sklansky adder propagates a carry across a 32-bit boundary.
module tb_wallace_mult32;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  int n_upper = 0, n_chain_end = 0, n_lateral = 0, n_long_carry = 0;

  wallace_mult32 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned exp;
    #1;
    exp = longint'(a) * longint'(b);
    checks++;
    if (p != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h expected %h", a, b, p, exp);
    end
    if (dut.u_tree.o1a1 != 0 || dut.u_tree.o1a2 != 0) n_upper++;
    if (dut.u_tree.o1d1 != 0 || dut.u_tree.o1d2 != 0) n_chain_end++;
    if (dut.u_tree.u_s4.co_col != 0) n_lateral++;
    if (dut.u_cpa.gfin[31] && dut.u_cpa.p0[32]) n_long_carry++;
  endtask

  initial begin
    logic [31:0] pats [7];
    pats = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h5555_5555,
             32'hAAAA_AAAA, 32'h0000_FFFF};
    foreach (pats[i]) foreach (pats[j]) begin
      a = pats[i]; b = pats[j]; check();
    end
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      a = 32'h1 << i; b = ~(32'h1 << j); check();
    end
    for (int t = 0; t < 20000; t++) begin
      a = $urandom(); b = $urandom();
      check();
    end
    $display("mechanisms: upper-row carries %0d, chain-end couts %0d, 4:2 lateral %0d, long adder carry %0d",
             n_upper, n_chain_end, n_lateral, n_long_carry);
    checks += 4;
    if (n_upper == 0)      begin failures++; $display("FAIL upper-row carries never set"); end
    if (n_chain_end == 0)  begin failures++; $display("FAIL chain-end couts never set"); end
    if (n_lateral == 0)    begin failures++; $display("FAIL 4:2 lateral carries never set"); end
    if (n_long_carry == 0) begin failures++; $display("FAIL no carry across bit 32"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
