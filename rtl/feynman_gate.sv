// Feynman (controlled-NOT) gate applied bitwise to a W-bit bus, the reversible
// XOR/copy cell the reference design uses throughout.
//
// Outputs P = A and Q = A xor B. With B tied to zero the gate is a reversible
// fan-out (Q copies A), which is how the rotator and the S-box datapath copy
// bits; with B used it is the modulo-2 adder of the message/key XOR, the
// round-key addition and the MixColumns sums. Purely combinational. Output p
// is by definition a wire from input a: a reversible gate passes its control
// line through.
module feynman_gate #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p,
  output logic [W-1:0] q
);
  assign p = a;
  assign q = a ^ b;
endmodule
