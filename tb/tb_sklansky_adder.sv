// tb_sklansky_adder: the 64-bit adder against the simulator's own '+' on
// corner cases (full carry chains, alternating patterns) and random operands
// with both values of cin. Also runs a 13-bit instance to cover a width that
// is not a power of two.
module tb_sklansky_adder;
  localparam int W = 64;
  localparam int W2 = 13;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  logic [W2-1:0] a2, b2, sum2;
  logic cin2, cout2;
  int checks = 0, failures = 0;

  sklansky_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  sklansky_adder #(.W(W2)) dut2 (.a(a2), .b(b2), .cin(cin2), .sum(sum2), .cout(cout2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W:0] exp;
    logic [W2:0] exp2;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};
    exp2 = {1'b0, a2} + {1'b0, b2} + {{W2{1'b0}}, cin2};
    checks += 2;
    if ({cout, sum} != exp) begin
      failures++;
      $display("FAIL %h + %h + %0d = %h expected %h", a, b, cin, {cout, sum}, exp);
    end
    if ({cout2, sum2} != exp2) begin
      failures++;
      $display("FAIL(13) %h + %h + %0d = %h expected %h", a2, b2, cin2, {cout2, sum2}, exp2);
    end
  endtask

  initial begin
    logic [W-1:0] pats [6];
    pats = '{64'h0, 64'hFFFF_FFFF_FFFF_FFFF, 64'h1, 64'h5555_5555_5555_5555,
             64'hAAAA_AAAA_AAAA_AAAA, 64'h8000_0000_0000_0000};
    foreach (pats[i]) foreach (pats[j]) for (int c = 0; c < 2; c++) begin
      a = pats[i]; b = pats[j]; cin = 1'(c);
      a2 = pats[i][W2-1:0]; b2 = pats[j][W2-1:0]; cin2 = 1'(c);
      check();
    end
    for (int t = 0; t < 2000; t++) begin
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()}; cin = 1'($urandom());
      if (t % 4 == 0) b = ~a;  // long propagate chains
      a2 = W2'($urandom()); b2 = W2'($urandom()); cin2 = 1'($urandom());
      if (t % 4 == 1) b2 = ~a2;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
