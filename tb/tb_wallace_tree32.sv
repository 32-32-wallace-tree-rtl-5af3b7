// tb_wallace_tree32: the compressor tree on its own. Partial-product rows
// are formed here from random and corner operands; the two output rows must
// add to a*b modulo 2^64. The test also counts how often each carry path of
// the tree carries a 1 (upper-row couts into the lower rows, the chain-end
// couts passed to stage 2, the lateral carries of the 4:2 row) and fails if
// one of them never does.
module tb_wallace_tree32;
  localparam int N = 32;
  logic [N-1:0] a, b;
  logic [N-1:0] pp [N];
  logic [2*N-1:0] row_s, row_c;
  int checks = 0, failures = 0;
  int n_upper = 0, n_chain_end = 0, n_stage2 = 0, n_lateral = 0;

  wallace_tree32 dut (.pp(pp), .row_s(row_s), .row_c(row_c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned exp;
    for (int j = 0; j < N; j++) pp[j] = b[j] ? a : '0;
    #1;
    exp = longint'(a) * longint'(b);
    checks++;
    if (row_s + row_c != exp) begin
      failures++;
      $display("FAIL a=%h b=%h: %h + %h != %h", a, b, row_s, row_c, exp);
    end
    if (dut.o1a1 != 0 || dut.o1a2 != 0) n_upper++;
    if (dut.o1d1 != 0 || dut.o1d2 != 0) n_chain_end++;
    if (dut.o2a1 != 0 || dut.o2a2 != 0) n_stage2++;
    if (dut.u_s4.co_col != 0) n_lateral++;
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = '1; b = 32'h1; check();
    a = 32'h8000_0000; b = 32'h8000_0000; check();
    for (int t = 0; t < 3000; t++) begin
      a = $urandom(); b = $urandom();
      if (t % 10 == 0) a = a | 32'hFFFF_0000;
      check();
    end
    $display("carry paths used: upper %0d, chain end %0d, stage-2 %0d, 4:2 lateral %0d",
             n_upper, n_chain_end, n_stage2, n_lateral);
    checks += 4;
    if (n_upper == 0)     begin failures++; $display("FAIL upper-row couts never set"); end
    if (n_chain_end == 0) begin failures++; $display("FAIL chain-end couts never set"); end
    if (n_stage2 == 0)    begin failures++; $display("FAIL stage-2 couts never set"); end
    if (n_lateral == 0)   begin failures++; $display("FAIL 4:2 lateral carries never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
