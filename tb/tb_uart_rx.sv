// tb_uart_rx -- self-checking testbench for the UART receiver.
//
// The testbench drives frames on rx itself, 8 cycles per bit, with random
// idle gaps: every byte must come out once on data with a valid pulse; a
// frame whose stop bit is 0 must give frame_err and no valid; a low glitch
// of 2 cycles on the idle line must be ignored. It also checks that valid
// comes within the stop bit (mid-bit sampling).
module tb_uart_rx;
  import uart_bist_pkg::*;
  localparam int CPB = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic  rst, rx, valid, frame_err;
  byte_t data;
  int    valids = 0, errs = 0;
  byte_t last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rx, .data, .valid, .frame_err);

  always @(posedge clk) begin
    if (valid) begin valids++; last = data; end
    if (frame_err) errs++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(byte_t b, bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = f[i];
      repeat (CPB) @(posedge clk);
    end
    rx = 1'b1;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; rx = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      byte_t b;
      int v0;
      b = byte_t'($urandom);
      v0 = valids;
      send(b, 1'b1);
      // valid has come by the end of the stop bit plus synchronizer delay
      repeat (3) @(posedge clk);
      check(valids == v0 + 1, $sformatf("one valid for byte %0d", n));
      check(last == b, $sformatf("data %h got %h", b, last));
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end
    begin
      int v0, e0;
      v0 = valids; e0 = errs;
      send(8'hA5, 1'b0);         // broken stop bit
      repeat (3) @(posedge clk);
      check(errs == e0 + 1 && valids == v0, "framing error");
      repeat (2 * CPB) @(posedge clk);   // line back high
      // glitch
      v0 = valids; e0 = errs;
      rx = 0; repeat (2) @(posedge clk); rx = 1;
      repeat (12 * CPB) @(posedge clk);
      check(valids == v0 && errs == e0, "glitch ignored");
      send(8'h3C, 1'b1);
      repeat (3) @(posedge clk);
      check(valids == v0 + 1 && last == 8'h3C, "receives after glitch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
