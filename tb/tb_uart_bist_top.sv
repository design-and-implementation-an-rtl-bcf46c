// tb_uart_bist_top -- end-to-end testbench of the UART built-in self-test.
//
// Runs the whole design at 8 clock cycles per bit (CLK_HZ = 80, BAUD = 10)
// over 6 patterns seeded at 508, so the generator wraps 511 -> 0:
//   1. fault-free test: every comparison passes, the captured reference and
//      tested frames carry the pattern's low byte, irq stays low, done rises
//      and the UART returns to normal mode;
//   2. stuck-at-0 on bit 0 of the UART under test: exactly the patterns with
//      bit 0 = 1 fail, irq rises and interrupt_clear_i clears it;
//   3. stuck-at-1 on bit 0: exactly the patterns with bit 0 = 0 fail;
//   4. normal mode: bytes sent through tx_start_i / tx_data_i, looped from
//      tx_o to rx_i, come back on rx_data_o; in test mode tx_o stays idle.
// A second instance with the LFSR generator runs alongside, and its patterns
// must follow x^9 + x^5 + 1 from seed 1. Each mechanism (seed load, wrap,
// echo, pass, sa0 and sa1 detection, interrupt set and clear, mode switch,
// normal-mode transfer) is counted and must happen at least once.
module tb_uart_bist_top;
  import uart_bist_pkg::*;
  localparam int NP = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, bist_start, irq_clear, sa0, sa1;
  logic [8:0] seed;
  logic       test_mode, bist_busy, bist_done, irq, result;
  logic [8:0] lfsr_out;
  logic       doutp1, uart_out1, doutp2, uart_out2;
  frame_t     reference_out, tested_out;
  logic       rx_i, tx_o, tx_start_i, tx_busy_o, rx_valid_o, rx_frame_err_o;
  byte_t      tx_data_i, rx_data_o;

  assign rx_i = tx_o;     // external loop for normal mode

  uart_bist_top #(.CLK_HZ(80), .BAUD(10), .NUM_PATTERNS(NP)) u_dut (
    .clk, .rst, .bist_start, .seed, .interrupt_clear_i(irq_clear),
    .inject_sa0(sa0), .inject_sa1(sa1),
    .test_mode, .bist_busy, .bist_done, .irq, .result,
    .lfsr_out, .doutp1, .uart_out1, .doutp2, .uart_out2, .reference_out, .tested_out,
    .rx_i, .tx_o, .tx_start_i, .tx_data_i, .tx_busy_o, .rx_data_o, .rx_valid_o,
    .rx_frame_err_o
  );

  // second instance: LFSR generator
  logic       l_mode, l_busy, l_done, l_irq, l_result, l_d1, l_u1, l_d2, l_u2, l_tx, l_txb;
  logic       l_rxv, l_rxe;
  logic [8:0] l_pat;
  frame_t     l_ref, l_tst;
  byte_t      l_rxd;
  uart_bist_top #(.CLK_HZ(80), .BAUD(10), .NUM_PATTERNS(5), .TPG_MODE(TPG_LFSR)) u_lfsr_dut (
    .clk, .rst, .bist_start, .seed(9'd1), .interrupt_clear_i(1'b0),
    .inject_sa0(1'b0), .inject_sa1(1'b0),
    .test_mode(l_mode), .bist_busy(l_busy), .bist_done(l_done), .irq(l_irq), .result(l_result),
    .lfsr_out(l_pat), .doutp1(l_d1), .uart_out1(l_u1), .doutp2(l_d2), .uart_out2(l_u2),
    .reference_out(l_ref), .tested_out(l_tst),
    .rx_i(1'b1), .tx_o(l_tx), .tx_start_i(1'b0), .tx_data_i('0), .tx_busy_o(l_txb),
    .rx_data_o(l_rxd), .rx_valid_o(l_rxv), .rx_frame_err_o(l_rxe)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // frame captured by a SIPO: q[9] start, q[8..1] = d0..d7, q[0] stop
  function automatic frame_t cap(byte_t d);
    frame_t q;
    q[9] = 1'b0; q[0] = 1'b1;
    for (int i = 0; i < 8; i++) q[8 - i] = d[i];
    return q;
  endfunction

  // mechanism counters
  int n_seed = 0, n_wrap = 0, n_echo = 0, n_pass = 0, n_sa0 = 0, n_sa1 = 0;
  int n_irq = 0, n_irq_clr = 0, n_mode = 0, n_normal = 0, n_lfsr = 0;

  // scoreboard on each comparison: the testbench's own pattern sequence
  int         k = 0;          // comparison index within a run
  logic [8:0] exp_pat;
  bit         exp_fail;
  logic [8:0] prev_pat;
  logic       prev_irq = 0, prev_mode = 0;
  always @(posedge clk) if (!rst) begin
    if (u_dut.tpg_load) n_seed++;
    if (lfsr_out == 9'd0 && prev_pat == 9'd511) n_wrap++;
    prev_pat <= lfsr_out;
    if (u_dut.echo_start) n_echo++;
    if (irq && !prev_irq) n_irq++;
    if (!irq && prev_irq) n_irq_clr++;
    prev_irq <= irq;
    if (test_mode != prev_mode) n_mode++;
    prev_mode <= test_mode;
    if (u_dut.tra_strobe) begin
      exp_pat = 9'(int'(seed) + k);
      check(lfsr_out == exp_pat, $sformatf("pattern %0d is %0d, expected %0d", k, lfsr_out, exp_pat));
      check(reference_out == cap(exp_pat[7:0]), $sformatf("reference frame %b", reference_out));
      exp_fail = (sa0 && exp_pat[0]) || (sa1 && !exp_pat[0]);
      if (!exp_fail) begin
        check(tested_out == cap(exp_pat[7:0]), $sformatf("tested frame %b", tested_out));
        n_pass++;
      end else begin
        check(tested_out != reference_out, "faulty response differs");
        if (sa0) n_sa0++;
        if (sa1) n_sa1++;
      end
      k++;
    end
    if (u_dut.u_tra.strobe === 1'b0 && $past(u_dut.tra_strobe)) begin
      check(result == !exp_fail, $sformatf("result %0d for pattern %0d", result, exp_pat));
    end
  end

  // LFSR instance: patterns at its comparisons follow x^9 + x^5 + 1 from 1
  logic [8:0] l_exp = 9'd1;
  always @(posedge clk) if (!rst && u_lfsr_dut.tpg_load) l_exp <= 9'd1;
  else if (!rst && u_lfsr_dut.tra_strobe) begin
    check(l_pat == l_exp, $sformatf("lfsr pattern %0d expected %0d", l_pat, l_exp));
    check(l_tst == cap(l_exp[7:0]) && l_ref == l_tst, "lfsr-mode frames");
    l_exp <= {l_exp[7:0], l_exp[3] ^ l_exp[8]};
    n_lfsr++;
  end

  task automatic run_test(bit f0, bit f1, logic [8:0] s, bit clear_irq);
    sa0 = f0; sa1 = f1; seed = s; k = 0;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    check(test_mode && bist_busy, "test mode entered");
    while (!bist_done) begin
      @(negedge clk);
      check(tx_o == 1'b1, "tx_o idle in test mode");
      if (clear_irq && irq) begin
        irq_clear = 1; @(negedge clk); irq_clear = 0;
        check(!irq || u_dut.tra_error, "irq cleared");
      end
    end
    check(!test_mode && !bist_busy, "back to normal mode");
    check(k == NP, $sformatf("%0d comparisons", k));
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bist_start = 0; irq_clear = 0; sa0 = 0; sa1 = 0; seed = '0;
    tx_start_i = 0; tx_data_i = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    check(!test_mode && result && !irq, "idle after reset");

    // 1. fault-free
    run_test(0, 0, 9'd508, 0);
    check(!irq && result, "fault-free run passes");
    check(l_done && !l_irq && n_lfsr == 5, "LFSR-mode run passes");   // it reruns with each start

    // 2. stuck-at-0, irq cleared as it comes
    run_test(1, 0, 9'd508, 1);
    // 3. stuck-at-1, irq left pending
    run_test(0, 1, 9'd508, 0);
    check(irq, "irq pending after faulty run");
    @(negedge clk); irq_clear = 1; @(negedge clk); irq_clear = 0;
    check(!irq, "irq cleared after run");
    sa1 = 0;

    // 4. normal mode through the external loop
    for (int n = 0; n < 4; n++) begin
      byte_t b;
      b = byte_t'($urandom);
      @(negedge clk); tx_data_i = b; tx_start_i = 1;
      @(negedge clk); tx_start_i = 0;
      fork
        begin : wait_valid
          @(posedge clk iff rx_valid_o);
          check(rx_data_o == b, $sformatf("normal mode byte %h got %h", b, rx_data_o));
          n_normal++;
        end
        begin repeat (12 * 8) @(posedge clk); end
      join_any
      disable fork;
      repeat (8) @(posedge clk);
    end

    check(n_seed == 3, $sformatf("seed loads %0d", n_seed));
    check(n_wrap >= 3, $sformatf("wraps %0d", n_wrap));
    check(n_echo == 3 * NP, $sformatf("echoes %0d", n_echo));
    check(n_pass > 0 && n_sa0 == 3 && n_sa1 == 3,
          $sformatf("pass %0d sa0 %0d sa1 %0d", n_pass, n_sa0, n_sa1));
    check(n_irq > 0 && n_irq_clr > 0, $sformatf("irq set %0d cleared %0d", n_irq, n_irq_clr));
    check(n_mode == 6, $sformatf("mode switches %0d", n_mode));
    check(n_normal == 4, $sformatf("normal transfers %0d", n_normal));
    $display("mechanisms: seed=%0d wrap=%0d echo=%0d pass=%0d sa0=%0d sa1=%0d irq=%0d irq_clear=%0d mode=%0d normal=%0d lfsr=%0d",
             n_seed, n_wrap, n_echo, n_pass, n_sa0, n_sa1, n_irq, n_irq_clr, n_mode, n_normal, n_lfsr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
