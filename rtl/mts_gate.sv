// MTS gate: the reversible 4-input, 4-output full-adder cell of the ripple-carry
// adder.
//
// Inputs a, b, c (carry in) and d (constant 0 in the adder). Outputs:
//   p = a                         (garbage)
//   q = a ^ b                     (garbage, the propagate term)
//   r = a ^ b ^ c                 (sum)
//   s = d ^ (a & b) ^ (c & (a^b)) (carry out when d = 0)
// The mapping is one-to-one on the 16 input patterns, so the cell is
// reversible. Output p is a wire from input a by construction. Only the sum
// and carry roles of the outputs are taken from the adder drawing; the exact
// garbage outputs are this design's choice. Purely combinational.
module mts_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic prop;
  assign prop = a ^ b;
  assign p = a;
  assign q = prop;
  assign r = prop ^ c;
  assign s = d ^ (a & b) ^ (c & prop);
endmodule
