// tb_uart_bist_full -- full-size run of the UART built-in self-test.
//
// The design at its default parameters (50 MHz clock, 9600 baud, so 5208
// cycles per bit; 9-bit counting generator; 512 patterns) runs one complete
// fault-free self-test from seed 0: all 512 patterns 0..511 must be applied
// in order, each comparison must pass with both captured frames carrying the
// pattern's low byte, irq must stay low and done must rise. The testbench
// also measures the test length and checks it against the expected ~19.5
// bit times per pattern (between 19 and 21 bit times on average). About 52
// million clock cycles.
module tb_uart_bist_full;
  import uart_bist_pkg::*;
  localparam int CPB = 50_000_000 / 9600;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #10 clk = ~clk;

  logic       rst, bist_start;
  logic       test_mode, bist_busy, bist_done, irq, result;
  logic [8:0] lfsr_out;
  logic       doutp1, uart_out1, doutp2, uart_out2;
  frame_t     reference_out, tested_out;
  logic       tx_o, tx_busy_o, rx_valid_o, rx_frame_err_o;
  byte_t      rx_data_o;

  uart_bist_top u_dut (
    .clk, .rst, .bist_start, .seed(9'd0), .interrupt_clear_i(1'b0),
    .inject_sa0(1'b0), .inject_sa1(1'b0),
    .test_mode, .bist_busy, .bist_done, .irq, .result,
    .lfsr_out, .doutp1, .uart_out1, .doutp2, .uart_out2, .reference_out, .tested_out,
    .rx_i(1'b1), .tx_o, .tx_start_i(1'b0), .tx_data_i('0), .tx_busy_o, .rx_data_o,
    .rx_valid_o, .rx_frame_err_o
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic frame_t cap(byte_t d);
    frame_t q;
    q[9] = 1'b0; q[0] = 1'b1;
    for (int i = 0; i < 8; i++) q[8 - i] = d[i];
    return q;
  endfunction

  int k = 0;
  longint cycles = 0;
  always @(posedge clk) begin
    if (bist_busy) cycles++;
    if (!rst && u_dut.tra_strobe) begin
      check(lfsr_out == 9'(k), $sformatf("pattern %0d applied as %0d", k, lfsr_out));
      check(reference_out == cap(8'(k)) && tested_out == reference_out,
            $sformatf("frames for pattern %0d", k));
      k++;
    end
    if (!rst && u_dut.tra_error) check(0, $sformatf("comparison failed at pattern %0d", k - 1));
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bist_start = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk); bist_start = 1;
    @(negedge clk); bist_start = 0;
    wait (bist_done);
    @(negedge clk);
    check(k == 512, $sformatf("%0d patterns applied", k));
    check(!irq && result && !test_mode, "test passed, normal mode again");
    check(cycles >= longint'(512) * 19 * CPB && cycles <= longint'(512) * 21 * CPB,
          $sformatf("test length %0d cycles (%0d per pattern)", cycles, cycles / 512));
    $display("test length %0d cycles, %0d per pattern, %0d bit times x100",
             cycles, cycles / 512, cycles * 100 / 512 / CPB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
