// SubBytes with the dynamic S-box: every one of the 16 state bytes is
// replaced by the table entry it indexes, out[i] = sbox[in[i]]. The table is
// supplied whole, so all 16 lookups are parallel 256-to-1 multiplexers.
// Purely combinational. The parallel-multiplexer lookup is this design's
// choice; the reference design does not describe the lookup.
module sub_bytes
  import dsbox_pkg::*;
(
  input  state_t s_in,
  input  sbox_t  sbox,
  output state_t s_out
);
  always_comb begin
    for (int i = 0; i < NBYTES; i++) s_out[i] = sbox[s_in[i]];
  end
endmodule
