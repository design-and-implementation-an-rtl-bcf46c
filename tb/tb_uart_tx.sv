// tb_uart_tx -- self-checking testbench for the UART transmitter.
//
// With 8 cycles per bit, each random byte must appear on tx as a start bit
// (0), the eight data bits LSB first and a stop bit (1), each bit sampled in
// the middle of its 8-cycle slot; busy must last exactly 80 cycles and done
// pulse once at the end; a start pulse while busy must be ignored; the line
// idles high.
module tb_uart_tx;
  import uart_bist_pkg::*;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic  rst, start, tx, busy, done;
  byte_t data;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .start, .data, .tx, .busy, .done);

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
    rst = 1; start = 0; data = '0;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    check(tx == 1'b1 && !busy, "idle line high");
    for (int n = 0; n < 30; n++) begin
      byte_t b;
      logic [9:0] got;
      int busy_cycles, dones;
      b = byte_t'($urandom);
      data = b; start = 1;
      @(posedge clk); #1;
      start = 0;
      data = ~b;            // data may change once the frame started
      busy_cycles = 0; dones = 0;
      for (int c = 0; c < 10 * CPB; c++) begin
        if (c % CPB == CPB / 2) got[c / CPB] = tx;
        if (busy) busy_cycles++;
        if (done) dones++;
        if (c == 3 * CPB) begin start = 1; end   // ignored while busy
        if (c == 3 * CPB + 1) start = 0;
        @(posedge clk); #1;
      end
      if (done) dones++;
      check(got[0] == 1'b0, $sformatf("start bit, byte %0d", n));
      check(got[8:1] == b, $sformatf("data %h got %h", b, got[8:1]));
      check(got[9] == 1'b1, "stop bit");
      check(busy_cycles == 10 * CPB, $sformatf("busy %0d cycles", busy_cycles));
      check(dones == 1 && !busy && tx, "done once, then idle");
      repeat (n % 3) @(posedge clk);
      #1;
      check(tx == 1'b1 && !busy, "idle between frames");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
