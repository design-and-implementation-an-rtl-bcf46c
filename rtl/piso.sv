// piso -- parallel-in serial-out shift register.
//
// load (priority) copies din into the register; shift moves it one place
// towards bit 0 and fills the top with FILL. dout is bit 0, so the word
// leaves least significant bit first, one bit per shift, and the value of
// FILL follows once it is empty. Synchronous active-high reset fills the
// register with FILL. With FILL = 1 and a word holding a UART frame
// (start bit in bit 0) the output is a ready UART line that idles high.
//
// The design uses a PISO to serialise each test pattern into a UART; the
// width, the shift direction, the fill value and the reset are this design's
// choices.
module piso #(
  parameter int unsigned WIDTH = 10,   // one UART frame: start + 8 data + stop
  parameter bit          FILL  = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic             dout
);
  logic [WIDTH-1:0] q;

  always_ff @(posedge clk) begin
    if (rst)        q <= {WIDTH{FILL}};
    else if (load)  q <= din;
    else if (shift) q <= {FILL, q[WIDTH-1:1]};
  end

  assign dout = q[0];
endmodule
