// tb_fa: exhaustive check of the full adder. For all 8 input patterns the
// outputs must satisfy s + 2*co == a + b + c.
module tb_fa;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  fa dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(s) + 2 * int'(co) != $countones(v)) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> s=%0d co=%0d", a, b, c, s, co);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
