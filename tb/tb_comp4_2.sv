// tb_comp4_2: exhaustive check of the 4:2 compressor over all 32 input
// patterns: sum + 2*(carry + cout) must equal the number of ones in
// x[3:0] and cin, and cout must be the same for cin = 0 and cin = 1
// (no carry ripple through a row).
module tb_comp4_2;
  logic [3:0] x;
  logic cin, sum, carry, cout;
  int checks = 0, failures = 0;

  comp4_2 dut (.x(x), .cin(cin), .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout0;
    for (int v = 0; v < 16; v++) begin
      for (int ci = 0; ci < 2; ci++) begin
        x = 4'(v);
        cin = 1'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * (int'(carry) + int'(cout)) != $countones(v) + ci) begin
          failures++;
          $display("FAIL x=%b cin=%0d -> sum=%0d carry=%0d cout=%0d", x, cin, sum, carry, cout);
        end
        if (ci == 0) cout0 = cout;
        else begin
          checks++;
          if (cout != cout0) begin
            failures++;
            $display("FAIL x=%b: cout depends on cin", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
