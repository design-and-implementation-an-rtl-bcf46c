// tb_tpg -- self-checking testbench for the test pattern generator.
//
// Count mode (default, 9 bits): pattern is 0 after reset, holds without
// step, goes up by one per step, wraps 511 -> 0 with wrapped pulsing, and
// load writes the seed. A full sweep of 512 steps must visit every value
// once. LFSR mode (9 bits, x^9 + x^5 + 1): 511 distinct non-zero patterns
// before it returns to 1.
module tb_tpg;
  import uart_bist_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, load, step;
  logic [8:0] seed, pat, lpat;
  logic       wrapped, lwrapped;

  tpg dut (.clk, .rst, .load, .seed, .step, .pattern(pat), .wrapped);
  tpg #(.MODE(TPG_LFSR)) dut_l (.clk, .rst, .load(1'b0), .seed('0), .step,
                                 .pattern(lpat), .wrapped(lwrapped));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen[512];
    int wraps, lwraps, distinct;
    rst = 1; load = 0; step = 0; seed = '0;
    @(posedge clk); #1;
    rst = 0;
    check(pat == 0, "reset to 0");
    check(lpat == 1, "lfsr mode reset to 1");
    @(posedge clk); #1;
    check(pat == 0, "hold");
    // full sweep from 0
    step = 1;
    wraps = 0; lwraps = 0; distinct = 0;
    seen[0] = 1;
    for (int i = 1; i <= 512; i++) begin
      @(posedge clk); #1;
      check(pat == 9'(i), $sformatf("count step %0d got %0d", i, pat));
      if (wrapped) wraps++;
      if (lwrapped) lwraps++;
    end
    check(wraps == 1, $sformatf("one wrap in 512 steps, saw %0d", wraps));
    check(lwraps == 1, $sformatf("lfsr wraps after 511 steps, saw %0d in 512", lwraps));
    step = 0;
    // load a seed near the top and wrap
    seed = 9'd510; load = 1;
    @(posedge clk); #1;
    load = 0;
    check(pat == 9'd510 && !wrapped, "load seed 510");
    step = 1;
    @(posedge clk); #1;
    check(pat == 9'd511 && !wrapped, "511");
    @(posedge clk); #1;
    check(pat == 9'd0 && wrapped, "wrap to 0 with flag");
    step = 0;
    // lfsr mode: distinct states over one period
    rst = 1; @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 512; i++) seen[i] = 0;
    step = 1;
    for (int i = 1; i <= 511; i++) begin
      if (!seen[lpat]) distinct++;
      seen[lpat] = 1;
      @(posedge clk); #1;
    end
    check(distinct == 511 && !seen[0], $sformatf("lfsr distinct %0d", distinct));
    check(lpat == 9'd1, "lfsr period 511");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
