// Modulo 2^8 adder for two bytes.
//
// The bytes are added in the MTS-gate ripple-carry adder, giving a 9-bit
// result. When that result carries into bit 8, 256 is taken off so the result
// is again 8 bits: s = (a + b) mod 256. Purely combinational. This follows the
// reference description of the modulo adder.
module mod_adder8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [7:0] s
);
  logic [7:0]  sum;
  logic        cout;
  logic [15:0] garbage;
  logic [8:0]  full;
  logic [8:0]  reduced;

  rc_adder #(.W(8)) u_add (
    .a(a), .b(b), .cin(1'b0), .sum(sum), .cout(cout), .garbage(garbage)
  );

  assign full    = {cout, sum};
  assign reduced = full - (cout ? 9'h100 : 9'h000);
  assign s       = reduced[7:0];
endmodule
