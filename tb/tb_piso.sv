// tb_piso -- self-checking testbench for the PISO shift register.
//
// Loads random 10-bit words and checks that dout presents bit 0 first and
// then each higher bit after every shift, that the register fills with 1s
// after the word, that it holds without shift, that load beats shift and
// that reset sets the output to the fill value.
module tb_piso;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, load, shift, dout;
  logic [9:0] din;

  piso dut (.clk, .rst, .load, .shift, .din, .dout);

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
    rst = 1; load = 0; shift = 0; din = '0;
    @(posedge clk); #1;
    rst = 0;
    check(dout == 1'b1, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      logic [9:0] w;
      w = 10'($urandom);
      din = w; load = 1; shift = (n % 2 == 0);   // load wins over shift
      @(posedge clk); #1;
      load = 0; shift = 0;
      check(dout == w[0], "first bit");
      @(posedge clk); #1;
      check(dout == w[0], "hold without shift");
      for (int i = 1; i < 14; i++) begin
        shift = 1;
        @(posedge clk); #1;
        shift = 0;
        check(dout == (i < 10 ? w[i] : 1'b1), $sformatf("word %0d bit %0d", n, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
