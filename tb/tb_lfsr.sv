// tb_lfsr -- self-checking testbench for the Fibonacci LFSR.
//
// 5-bit default (taps at stages 1 and 4): each step is compared with the
// bit-level update q0' = q1 ^ q4, qi' = q(i-1), the serial output with the
// top stage, and the sequence must return to its seed after exactly 31 steps
// with all 31 states distinct. Maximal-length 8-bit (mask 8'h8E) and 16-bit
// (mask 16'h8016) instances must show periods 255 and 65535. Also checks
// load, enable low and reset. A 32-bit instance (mask 32'hE000_0200) is
// compared with its bit recurrence over 65535 steps; its full period of
// 2**32 - 1 is too long to simulate.
module tb_lfsr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst, load, en;
  logic [4:0]  seed5, q5;
  logic        out5;
  logic [7:0]  q8;
  logic [15:0] q16;
  logic [31:0] q32;
  logic        o8_unused, o16_unused, o32_unused;

  lfsr dut5 (.clk, .rst, .load, .seed(seed5), .en, .q(q5), .out(out5));
  lfsr #(.WIDTH(8),  .TAPS(8'h8E))    dut8  (.clk, .rst, .load(1'b0), .seed('0), .en,
                                              .q(q8),  .out(o8_unused));
  lfsr #(.WIDTH(16), .TAPS(16'h8016)) dut16 (.clk, .rst, .load(1'b0), .seed('0), .en,
                                              .q(q16), .out(o16_unused));
  lfsr #(.WIDTH(32), .TAPS(32'hE000_0200)) dut32 (.clk, .rst, .load(1'b0), .seed('0), .en,
                                                  .q(q32), .out(o32_unused));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp;
    bit seen[32];
    int p8, p16;
    logic [31:0] exp32;
    rst = 1; load = 0; en = 0; seed5 = '0;
    @(posedge clk); #1;
    rst = 0;
    check(q5 == 5'd1 && q8 == 8'd1 && q16 == 16'd1, "reset seed");
    // enable low holds
    @(posedge clk); #1;
    check(q5 == 5'd1, "hold when en=0");
    // load a seed
    seed5 = 5'b10110; load = 1;
    @(posedge clk); #1;
    load = 0;
    check(q5 == 5'b10110, "load");
    check(out5 == 1'b1, "output is top stage");
    // 31 steps
    en = 1;
    exp = 5'b10110;
    seen[exp] = 1;
    for (int i = 1; i <= 31; i++) begin
      exp = {exp[3:0], exp[1] ^ exp[4]};
      @(posedge clk); #1;
      check(q5 == exp, $sformatf("step %0d: q=%b exp=%b", i, q5, exp));
      check(out5 == q5[4], "serial output");
      if (i < 31) begin
        check(!seen[q5] && q5 != 0, $sformatf("state %b repeats early", q5));
        seen[q5] = 1;
      end
    end
    check(q5 == 5'b10110, "period 31");
    // periods of the wider registers, started from reset (seed 1)
    rst = 1; @(posedge clk); #1; rst = 0;
    p8 = 0; p16 = 0;
    exp32 = 32'd1;
    for (int i = 1; i <= 65535; i++) begin
      @(posedge clk); #1;
      // 32-bit: x^32 + x^22 + x^2 + x + 1 as stage-0 feedback of stages 31, 30, 29, 9
      exp32 = {exp32[30:0], exp32[31] ^ exp32[30] ^ exp32[29] ^ exp32[9]};
      if (i % 4096 == 0 || i < 64)
        check(q32 == exp32, $sformatf("32-bit step %0d", i));
      if (p8 == 0 && q8 == 8'd1) p8 = i;
      if (p16 == 0 && q16 == 16'd1) p16 = i;
    end
    check(p8 == 255, $sformatf("8-bit period %0d", p8));
    check(p16 == 65535, $sformatf("16-bit period %0d", p16));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
