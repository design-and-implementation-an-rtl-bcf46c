// tb_uart_bist_coverage -- stuck-at fault coverage of the self-test.
//
// Eight copies of the design, one per data bit (FAULT_BIT = 0..7), run at 8
// clock cycles per bit over 256 patterns from seed 0, i.e. every byte value
// once. Each copy runs three tests: fault-free, with stuck-at-0 and with
// stuck-at-1 injected on its bit. The fault-free run must report no failure;
// each faulty run must raise irq and fail exactly the 128 patterns whose
// affected bit differs from the stuck value. Together this shows all 16
// single stuck-at faults at the injection sites detected (100 % coverage
// of that fault list) and no false alarms.
module tb_uart_bist_coverage;
  import uart_bist_pkg::*;
  localparam int NP = 256;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, bist_start, sa0, sa1;
  logic [7:0] done_v, irq_v;
  int         fails [8];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  for (genvar b = 0; b < 8; b++) begin : g_dut
    logic       test_mode, busy, result, d1, u1, d2, u2, tx, txb, rxv, rxe;
    logic [8:0] pat;
    frame_t     rf, tf;
    byte_t      rxd;
    uart_bist_top #(.CLK_HZ(80), .BAUD(10), .NUM_PATTERNS(NP), .FAULT_BIT(b)) u_dut (
      .clk, .rst, .bist_start, .seed(9'd0), .interrupt_clear_i(1'b0),
      .inject_sa0(sa0), .inject_sa1(sa1),
      .test_mode, .bist_busy(busy), .bist_done(done_v[b]), .irq(irq_v[b]), .result,
      .lfsr_out(pat), .doutp1(d1), .uart_out1(u1), .doutp2(d2), .uart_out2(u2),
      .reference_out(rf), .tested_out(tf),
      .rx_i(1'b1), .tx_o(tx), .tx_start_i(1'b0), .tx_data_i('0), .tx_busy_o(txb),
      .rx_data_o(rxd), .rx_valid_o(rxv), .rx_frame_err_o(rxe)
    );
    always @(posedge clk) if (!rst && u_dut.tra_error) fails[b]++;
  end

  task automatic run(bit f0, bit f1, string name);
    for (int b = 0; b < 8; b++) fails[b] = 0;
    sa0 = f0; sa1 = f1;
    rst = 1; repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    wait (&done_v);
    repeat (2) @(posedge clk);
    for (int b = 0; b < 8; b++) begin
      int exp;
      exp = (f0 || f1) ? NP / 2 : 0;
      check(fails[b] == exp, $sformatf("%s bit %0d: %0d failing patterns, expected %0d",
                                       name, b, fails[b], exp));
      check(irq_v[b] == (f0 || f1), $sformatf("%s bit %0d: irq %0d", name, b, irq_v[b]));
    end
    $display("%s: failing patterns per bit %0d %0d %0d %0d %0d %0d %0d %0d", name,
             fails[0], fails[1], fails[2], fails[3], fails[4], fails[5], fails[6], fails[7]);
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int detected;
    bist_start = 0; sa0 = 0; sa1 = 0;
    run(0, 0, "fault-free");
    run(1, 0, "stuck-at-0");
    detected = 0;
    for (int b = 0; b < 8; b++) if (fails[b] > 0) detected++;
    run(0, 1, "stuck-at-1");
    for (int b = 0; b < 8; b++) if (fails[b] > 0) detected++;
    check(detected == 16, $sformatf("%0d of 16 stuck-at faults detected", detected));
    $display("fault coverage: %0d of 16 injected stuck-at faults detected", detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
