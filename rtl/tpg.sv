// tpg -- test pattern generator of the built-in self-test.
//
// Produces one WIDTH-bit test pattern and moves to the next one on each
// clock where step is high. load (priority) writes seed, the seed value fed
// by the BIST controller. In the default TPG_COUNT mode the pattern starts at
// 0 after reset, goes up by one per step and wraps from 2**WIDTH-1 (511) back
// to 0, so all 512 patterns of 9 bits are produced: this is the generator the
// design specifies. In TPG_LFSR mode the pattern is the state of a Fibonacci
// LFSR (module lfsr) with feedback mask LFSR_TAPS, which gives 2**WIDTH-1
// pseudo-random non-zero patterns; after reset it holds 1, and seed 0 would
// lock it.
//
// wrapped pulses high for the cycle after a step that returned the pattern
// to its starting point (0 in count mode, 1 in LFSR mode); it lets the
// controller and a testbench see the wrap. Interface and wrap flag are this
// design's choices.
module tpg
  import uart_bist_pkg::*;
#(
  parameter int unsigned      WIDTH     = 9,
  parameter tpg_mode_e        MODE      = TPG_COUNT,
  parameter logic [WIDTH-1:0] LFSR_TAPS = WIDTH'(9'h108)   // x^9 + x^5 + 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] pattern,
  output logic             wrapped
);
  localparam logic [WIDTH-1:0] ORIGIN = (MODE == TPG_COUNT) ? '0 : WIDTH'(1);

  if (MODE == TPG_COUNT) begin : g_count
    always_ff @(posedge clk) begin
      if (rst)       pattern <= '0;
      else if (load) pattern <= seed;
      else if (step) pattern <= pattern + 1'b1;
    end
  end else begin : g_lfsr
    logic serial_unused;
    lfsr #(.WIDTH(WIDTH), .TAPS(LFSR_TAPS), .RESET_SEED(WIDTH'(1))) u_lfsr (
      .clk, .rst, .load, .seed, .en(step), .q(pattern), .out(serial_unused)
    );
  end

  logic stepped;
  always_ff @(posedge clk) begin
    if (rst) stepped <= 1'b0;
    else     stepped <= step && !load;
  end
  assign wrapped = stepped && (pattern == ORIGIN);
endmodule
