// AddRoundKey: the state is added (XOR, modulo 2) to the round key through a
// 128-bit bank of Feynman gates, as the reference design does for every
// modulo-2 addition. Purely combinational.
module add_round_key
  import dsbox_pkg::*;
(
  input  state_t s_in,
  input  state_t rk,
  output state_t s_out
);
  logic [127:0] pass;
  feynman_gate #(.W(128)) u_xor (.a(rk), .b(s_in), .p(pass), .q(s_out));
endmodule
