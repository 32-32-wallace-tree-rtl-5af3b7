// tb_comp7_2: exhaustive check of the 7:2 compressor over all
// 512 input patterns. The reference is pure arithmetic:
//   sum + 2*carry + 2*cout1 + 4*cout2 == ones(y) + cin1 + cin2.
// It also checks that cout1/cout2 do not depend on cin1/cin2, and compares
// them with the internal-carry equations (CTEMP1..3 combined by a full
// adder) worked out here from the column bits.
module tb_comp7_2;
  localparam int K = 7;
  logic [K-1:0] y;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  comp7_2 dut (.y(y), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                 .cout1(cout1), .cout2(cout2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected cout1/cout2 from the temporaries.
  function automatic logic [1:0] ref_couts(input logic [6:0] yy);
    logic a, bb, t1, t2, t3;
    a  = yy[0] ^ yy[1] ^ yy[2];
    bb = yy[3] ^ yy[4] ^ yy[5];
    t1 = (yy[0] & yy[1]) | (yy[1] & yy[2]) | (yy[0] & yy[2]);
    t2 = (yy[3] & yy[4]) | (yy[4] & yy[5]) | (yy[3] & yy[5]);
    t3 = (a & bb) | (a & yy[6]) | (bb & yy[6]);
    return {(t1 & t2) | (t2 & t3) | (t1 & t3), t1 ^ t2 ^ t3};
  endfunction

  initial begin
    logic [1:0] c0, exp_c;
    for (int v = 0; v < (1 << K); v++) begin
      for (int ci = 0; ci < 4; ci++) begin
        y = K'(v);
        {cin2, cin1} = 2'(ci);
        #1;
        checks++;
        if (int'(sum) + 2 * int'(carry) + 2 * int'(cout1) + 4 * int'(cout2)
            != $countones(v) + $countones(ci)) begin
          failures++;
          $display("FAIL y=%b cin1=%0d cin2=%0d -> sum=%0d carry=%0d cout1=%0d cout2=%0d",
                   y, cin1, cin2, sum, carry, cout1, cout2);
        end
        if (ci == 0) c0 = {cout2, cout1};
        else begin
          checks++;
          if ({cout2, cout1} != c0) begin
            failures++;
            $display("FAIL y=%b: couts depend on the carry inputs", y);
          end
        end
        exp_c = ref_couts(7'(v));
        checks++;
        if ({cout2, cout1} != exp_c) begin
          failures++;
          $display("FAIL y=%b: cout2,cout1=%b%b expected %b", y, cout2, cout1, exp_c);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
