// tb_sipo -- self-checking testbench for the SIPO shift register.
//
// 4-stage default: four shifts put the first bit in stage D (q[3], also so)
// and the last in stage A (q[0]); the value holds without shift; the
// active-low clear empties the register at once, between clock edges.
// A 10-stage instance takes random UART-length words.
module tb_sipo;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       clr_n, shift, si, so, so10;
  logic [3:0] q;
  logic [9:0] q10;

  sipo dut (.clk, .clr_n, .shift, .si, .q, .so);
  sipo #(.WIDTH(10)) dut10 (.clk, .clr_n, .shift, .si, .q(q10), .so(so10));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 1; shift = 0; si = 0;
    #1 clr_n = 0;
    #1;
    check(q == 0 && q10 == 0, "cleared");
    clr_n = 1;
    for (int n = 0; n < 30; n++) begin
      logic [9:0] w;
      w = 10'($urandom);
      for (int i = 0; i < 10; i++) begin
        si = w[i]; shift = 1;
        @(posedge clk); #1;
        shift = 0;
        if (i == 3) begin
          check(q == {w[0], w[1], w[2], w[3]}, $sformatf("4-stage word %0d", n));
          check(so == w[0], "so is stage D");
        end
      end
      for (int i = 0; i < 10; i++)
        check(q10[9-i] == w[i], $sformatf("10-stage word %0d bit %0d", n, i));
      check(so10 == w[0], "10-stage so");
      si = ~si;
      @(posedge clk); #1;
      check(q10[9] == w[0], "hold without shift");
      // asynchronous clear between edges
      #2 clr_n = 0;
      #1;
      check(q == 0 && q10 == 0, "async clear");
      clr_n = 1;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
