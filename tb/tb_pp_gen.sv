// tb_pp_gen: random and corner operands. Each row must equal a ANDed with
// the replicated multiplier bit, checked bit by bit, and the rows weighted
// by 2^j must add up to a*b.
module tb_pp_gen;
  localparam int N = 32;
  logic [N-1:0] a, b;
  logic [N-1:0] pp [N];
  int checks = 0, failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint unsigned acc;
    #1;
    acc = 0;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        checks++;
        if (pp[j][i] != (a[i] && b[j])) begin
          failures++;
          $display("FAIL a=%h b=%h pp[%0d][%0d]=%0d", a, b, j, i, pp[j][i]);
        end
      end
      acc += longint'(pp[j]) << j;
    end
    checks++;
    if (acc != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL a=%h b=%h: rows sum to %h", a, b, acc);
    end
  endtask

  initial begin
    a = '0; b = '0; check();
    a = '1; b = '1; check();
    a = 32'h8000_0001; b = 32'h5555_AAAA; check();
    for (int t = 0; t < 200; t++) begin
      a = $urandom(); b = $urandom();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
