// lfsr -- Fibonacci linear feedback shift register.
//
// Stages are numbered 0 (least significant) to WIDTH-1 (most significant).
// On each clock with en high every stage takes the value of the stage below
// it, and stage 0 takes the XOR of the stages selected by TAPS. The serial
// output is the most significant stage; q is the whole register. load
// (priority over en) writes seed; synchronous active-high reset writes
// RESET_SEED. With a primitive feedback polynomial the register runs through
// all 2**WIDTH - 1 non-zero states; the all-zero state is a lock-up state and
// must not be used as a seed.
//
// The default (5 stages, taps at the outputs of stages 1 and 4 fed back into
// stage 0, output from stage 4) follows the generator architecture given in
// the design; it realises x^5 + x^3 + 1 and has period 31. XOR feedback, the
// load/enable ports and the reset seed are this design's choices. Useful
// maximal-length tap masks: 8 bits 8'h8E, 9 bits 9'h108, 16 bits 16'h8016,
// 32 bits 32'hE000_0200.
module lfsr #(
  parameter int unsigned     WIDTH      = 5,
  parameter logic [WIDTH-1:0] TAPS       = WIDTH'(5'b1_0010),
  parameter logic [WIDTH-1:0] RESET_SEED = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             out
);
  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (rst)       q <= RESET_SEED;
    else if (load) q <= seed;
    else if (en)   q <= {q[WIDTH-2:0], fb};
  end

  assign out = q[WIDTH-1];
endmodule
