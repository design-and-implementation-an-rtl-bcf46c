// rev_adder -- ripple-carry adder built from reversible Peres gates.
//
// Each bit position is a reversible full adder made of two Peres gates:
//   gate 1: (a, b, 0)        -> (a, a^b, a&b)
//   gate 2: (a^b, cin, a&b)  -> (a^b, a^b^cin = sum, (a^b)&cin ^ a&b = cout)
// The garbage outputs of the gates (p outputs) are left unused. The carry
// ripples from bit 0 upwards. Combinational: sum = a + b + cin, with cout the
// carry out of the top bit.
//
// The design states that the one addition inside the UART is done with
// reversible logic gates; which gate and the ripple structure are this
// design's choice. Here it increments the UART bit-timing counters.
module rev_adder #(
  parameter int unsigned WIDTH = 13
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic g1_q, g1_r;         // gate 1 outputs
    logic g1_p_unused, g2_p_unused;   // garbage outputs
    peres_gate u_g1 (.a(a[i]), .b(b[i]), .c(1'b0),
                     .p(g1_p_unused), .q(g1_q), .r(g1_r));
    peres_gate u_g2 (.a(g1_q), .b(carry[i]), .c(g1_r),
                     .p(g2_p_unused), .q(sum[i]), .r(carry[i+1]));
  end

  assign cout = carry[WIDTH];
endmodule
