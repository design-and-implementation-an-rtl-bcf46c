// sipo -- serial-in parallel-out shift register with active-low clear.
//
// Stage A (q[0]) takes si on every clock edge where shift is high, and each
// stage passes its value to the next (A -> B -> C -> D ...). After WIDTH
// shifts the first bit shifted in sits in the last stage, which also drives
// so (serial out, for cascading). clr_n clears every stage asynchronously,
// as the common clear line of the register drawn in the design does.
//
// The 4-stage default, the stage order, the serial output taken from the
// last stage and the asynchronous active-low clear follow the design
// description; the shift enable is this design's addition so the register
// can sample a UART line once per bit.
module sipo #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             clr_n,
  input  logic             shift,
  input  logic             si,
  output logic [WIDTH-1:0] q,
  output logic             so
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)     q <= '0;
    else if (shift) q <= {q[WIDTH-2:0], si};
  end

  assign so = q[WIDTH-1];
endmodule
