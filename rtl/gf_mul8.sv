// Multiplier in GF(2^8) with the AES field polynomial x^8+x^4+x^3+x+1.
//
// Shift-and-add: for each set bit of b, the current multiple of a is XORed
// into the product, and a is multiplied by x (shift left, reduce by 0x1b on
// overflow) between bits. Purely combinational; with a constant operand it
// reduces to a few XORs. The reference design only names a multiplier; the
// AES field and the shift-and-add structure are this design's choices.
module gf_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] p
);
  always_comb begin
    logic [7:0] m;
    m = a;
    p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ m;
      m = {m[6:0], 1'b0} ^ (m[7] ? 8'h1b : 8'h00);
    end
  end
endmodule
