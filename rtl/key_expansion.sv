// One step of the AES-128 key schedule: next round key from the current one.
//
// The round key is four 32-bit words w0..w3 (bytes 0-3 are w0). Then
//   t   = SubWord(RotWord(w3)) ^ {rcon, 0, 0, 0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// SubWord uses the same dynamic S-box as the rounds (in standard AES it is
// the fixed table). rcon_next = xtime(rcon) is produced for the following
// step. Purely combinational.
module key_expansion
  import dsbox_pkg::*;
(
  input  state_t     rk,
  input  logic [7:0] rcon,
  input  sbox_t      sbox,
  output state_t     rk_next,
  output logic [7:0] rcon_next
);
  logic [0:3][7:0] t;

  always_comb begin
    t[0] = sbox[rk[13]] ^ rcon;
    t[1] = sbox[rk[14]];
    t[2] = sbox[rk[15]];
    t[3] = sbox[rk[12]];
    for (int b = 0; b < 4; b++) rk_next[b] = rk[b] ^ t[b];
    for (int w = 1; w < 4; w++)
      for (int b = 0; b < 4; b++) rk_next[4*w+b] = rk[4*w+b] ^ rk_next[4*(w-1)+b];
  end

  assign rcon_next = {rcon[6:0], 1'b0} ^ (rcon[7] ? 8'h1b : 8'h00);
endmodule
