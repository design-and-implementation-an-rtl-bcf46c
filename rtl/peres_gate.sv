// peres_gate -- 3-input, 3-output reversible Peres gate.
//
// Mapping (a, b, c) -> (p, q, r) with p = a, q = a ^ b, r = (a & b) ^ c.
// The mapping is a bijection on 3 bits, so no information is lost. Two of
// these gates make a full adder (see rev_adder). Purely combinational. The
// design only states that the UART's adder uses reversible logic gates; the
// choice of the Peres gate is this design's.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
