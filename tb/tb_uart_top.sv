// tb_uart_top -- self-checking testbench for the UART under test.
//
// 8 cycles per bit. Normal mode: a byte written to the transmitter is looped
// on the wire back into the receiver and must come out unchanged. Test mode
// (loopback): frames driven on rx by the testbench must come back on tx as
// the same frame (echo), starting within one bit time after the received
// stop bit's middle. With stuck-at-0 / stuck-at-1 injected, bit 0 of the
// received and echoed byte must be forced.
module tb_uart_top;
  import uart_bist_pkg::*;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic  rst, loopback, sa0, sa1, rx, tx, tx_start, tx_busy, rx_valid, rx_ferr;
  byte_t tx_data, rx_data;
  logic  wire_loop;        // testbench: connect tx back to rx in normal mode
  logic  tb_rx;

  assign rx = wire_loop ? tx : tb_rx;

  uart_top #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .loopback, .flt_sa0(sa0), .flt_sa1(sa1), .rx, .tx,
    .tx_start, .tx_data, .tx_busy, .rx_data, .rx_valid, .rx_frame_err(rx_ferr)
  );

  int valids = 0; byte_t last;
  always @(posedge clk) if (rx_valid) begin valids++; last = rx_data; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic drive(byte_t b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      tb_rx = f[i];
      repeat (CPB) @(posedge clk);
    end
    tb_rx = 1'b1;
  endtask

  // sample the echoed frame on tx: wait for the start edge, then mid-bits
  task automatic capture(output logic [9:0] f, output int wait_cycles);
    wait_cycles = 0;
    while (tx == 1'b1 && wait_cycles < 40 * CPB) begin
      @(posedge clk); #1; wait_cycles++;
    end
    repeat (CPB / 2) @(posedge clk);
    #1;
    for (int i = 0; i < 10; i++) begin
      f[i] = tx;
      if (i < 9) begin repeat (CPB) @(posedge clk); #1; end
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; loopback = 0; sa0 = 0; sa1 = 0; tb_rx = 1; wire_loop = 1;
    tx_start = 0; tx_data = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // normal mode, wire loop
    for (int n = 0; n < 10; n++) begin
      byte_t b; int v0;
      b = byte_t'($urandom); v0 = valids;
      @(negedge clk); tx_data = b; tx_start = 1;
      @(negedge clk); tx_start = 0;
      repeat (11 * CPB) @(posedge clk);
      check(valids == v0 + 1 && last == b, $sformatf("normal mode byte %h got %h", b, last));
    end
    // test mode: echo
    wire_loop = 0; loopback = 1;
    repeat (2 * CPB) @(posedge clk);
    for (int n = 0; n < 24; n++) begin
      byte_t b, exp;
      logic [9:0] f;
      int w;
      b = byte_t'($urandom);
      sa0 = (n % 3 == 1); sa1 = (n % 3 == 2);
      exp = b;
      if (sa0) exp[0] = 1'b0;
      if (sa1) exp[0] = 1'b1;
      fork
        drive(b);
        capture(f, w);
      join
      check(f == {1'b1, exp, 1'b0}, $sformatf("echo of %h (sa0=%0d sa1=%0d) got %b",
                                               b, sa0, sa1, f));
      // echo starts about 9.5 bit times after the stimulus start bit
      check(w >= 9 * CPB && w <= 11 * CPB, $sformatf("echo delay %0d cycles", w));
      repeat (CPB) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
