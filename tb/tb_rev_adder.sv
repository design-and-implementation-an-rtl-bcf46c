// tb_rev_adder -- self-checking testbench for the reversible-gate adder.
//
// Checks a 4-bit instance exhaustively (all a, b, cin) and a 13-bit instance
// (the width used by the UART bit counters) with random operands, against
// the integer sum worked out in the testbench.
module tb_rev_adder;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [12:0] a13, b13, s13;
  logic        c13, co13;

  rev_adder #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  rev_adder               dut13 (.a(a13), .b(b13), .cin(c13), .sum(s13), .cout(co13));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        for (int c = 0; c < 2; c++) begin
          int unsigned exp;
          a4 = 4'(x); b4 = 4'(y); c4 = c[0];
          #1;
          exp = x + y + c;
          checks++;
          if ({co4, s4} != 5'(exp)) begin
            failures++;
            $display("FAIL 4-bit %0d+%0d+%0d got %0d", x, y, c, {co4, s4});
          end
        end
    for (int n = 0; n < 2000; n++) begin
      int unsigned exp;
      a13 = 13'($urandom); b13 = 13'($urandom); c13 = 1'($urandom);
      #1;
      exp = int'(a13) + int'(b13) + int'(c13);
      checks++;
      if ({co13, s13} != 14'(exp)) begin
        failures++;
        $display("FAIL 13-bit %0d+%0d+%0d got %0d", a13, b13, c13, {co13, s13});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
