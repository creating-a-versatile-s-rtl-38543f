// Per-byte mixing step of the dynamic S-box seed.
//
// For one byte a of alpha = key xor message: count its ones (n1) and zeros
// (n0 = 8 - n1), rotate a right by n1 and, separately, by n0, and add the two
// rotated bytes modulo 256 in the reversible modulo adder:
//   d = (ror(a, n1) + ror(a, n0)) mod 256
// A rotation by 8 is the identity, so the 3-bit rotate amount is the count
// mod 8. The counts are also brought out. Purely combinational.
// The step follows the reference algorithm. Of its two wordings, modular
// addition and XOR, addition is used: it reproduces the reference table.
module byte_mixer (
  input  logic [7:0] a,
  output logic [3:0] ones,
  output logic [3:0] zeros,
  output logic [7:0] d
);
  logic [7:0] rot1, rot0;

  always_comb begin
    ones = '0;
    for (int i = 0; i < 8; i++) ones = ones + 4'(a[i]);
  end
  assign zeros = 4'd8 - ones;

  rot_feynman #(.W(8), .RIGHT(1'b1)) u_rot1 (.x(a), .amt(ones[2:0]),  .y(rot1));
  rot_feynman #(.W(8), .RIGHT(1'b1)) u_rot0 (.x(a), .amt(zeros[2:0]), .y(rot0));

  mod_adder8 u_add (.a(rot1), .b(rot0), .s(d));
endmodule
