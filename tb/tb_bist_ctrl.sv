// tb_bist_ctrl -- self-checking testbench for the BIST control unit.
//
// 8 cycles per bit, 3 patterns. The testbench plays the rest of the design:
// it answers each PISO load with an echo_start 76 cycles later (9.5 bit
// times) for patterns 0 and 1, and never for pattern 2, which must then time
// out. It checks: test_mode and busy from start to the end; one tpg_load;
// a PISO load per pattern with the SIPO clear low in that same cycle;
// piso_shift every 8 cycles while sending; exactly 10 sipo_shift pulses per
// echo, at 4 + 8k cycles after echo_start; one tra_strobe and one tpg_step
// per pattern; irq set by tra_error and cleared by irq_clear; done at the
// end.
module tb_bist_ctrl;
  localparam int CPB = 8;
  localparam int NP  = 3;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, start, irq_clear, echo_start, tra_error;
  logic test_mode, busy, done, irq, tpg_load, tpg_step, piso_load, piso_shift;
  logic sipo_clr_n, sipo_shift, tra_strobe;

  bist_ctrl #(.CLKS_PER_BIT(CPB), .NUM_PATTERNS(NP)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  int loads = 0, tpg_loads = 0, steps = 0, strobes = 0, shifts_total = 0;
  int last_load = -1, echo_at = -1, last_pshift = -1, sshift_in_pat = 0;
  int strobe_at = -1;
  bit error_next = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (tpg_load) tpg_loads++;
      if (piso_load) begin
        loads++;
        last_load = cyc;
        last_pshift = cyc;
        sshift_in_pat = 0;
        check(sipo_clr_n == 1'b0, "SIPO clear low during load");
        check(test_mode && busy, "test mode during test");
      end else begin
        check(sipo_clr_n == 1'b1, "SIPO clear high outside load");
      end
      if (piso_shift) begin
        check(cyc - last_pshift == CPB, $sformatf("piso shift spacing %0d", cyc - last_pshift));
        last_pshift = cyc;
      end
      if (sipo_shift) begin
        check(echo_at >= 0 && cyc - echo_at == CPB / 2 + CPB * sshift_in_pat,
              $sformatf("sipo shift %0d at %0d after echo", sshift_in_pat, cyc - echo_at));
        sshift_in_pat++;
        shifts_total++;
      end
      if (tra_strobe) begin
        strobes++;
        strobe_at = cyc;
        if (loads <= 2) check(sshift_in_pat == 10, $sformatf("10 sipo shifts, saw %0d", sshift_in_pat));
        else            check(sshift_in_pat == 0 && cyc - last_load > 20 * CPB, "timeout step");
      end
      if (tpg_step) begin
        steps++;
        check(cyc == strobe_at + 1, "step right after compare");
      end
    end
  end

  // echo generator and analyzer stand-in
  always @(posedge clk) begin
    echo_start <= 1'b0;
    tra_error  <= 1'b0;
    if (!rst && loads <= 2 && last_load >= 0 && cyc == last_load + 76) begin
      echo_start <= 1'b1;
      echo_at = cyc + 1;
    end
    if (!rst && tra_strobe && loads == 2) tra_error <= 1'b1;   // 2nd pattern fails
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; irq_clear = 0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    check(!test_mode && !busy && !done && !irq, "idle after reset");
    start = 1; @(posedge clk); #1; start = 0;
    wait (irq); #1;
    check(loads == 2, "irq raised on the failing pattern");
    @(posedge clk); #1;
    irq_clear = 1; @(posedge clk); #1; irq_clear = 0;
    check(!irq, "irq cleared");
    wait (done); #1;
    check(!test_mode && !busy, "back to normal mode");
    check(tpg_loads == 1 && loads == NP && strobes == NP && steps == NP,
          $sformatf("counts load=%0d piso=%0d strobe=%0d step=%0d", tpg_loads, loads, strobes, steps));
    check(shifts_total == 20, "sipo shifts in total");
    repeat (20) @(posedge clk); #1;
    check(done && !busy && loads == NP, "stays done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
