// AES ShiftRows on a 128-bit state.
//
// Row r (bytes r, r+4, r+8, r+12 of the state, leftmost column first) is
// treated as a 32-bit word and rotated cyclically toward the left by its row
// number, N = 8*r bit positions, in a Feynman-gate rotator. So
// out[r][c] = in[r][(c + r) mod 4]. Purely combinational. The amounts are
// constants, so after synthesis every output is a wire to an input: the
// block is a fixed permutation and has no gates. Rotation by the row number
// follows the reference description; the left direction is that of AES.
module shift_rows
  import dsbox_pkg::*;
(
  input  state_t s_in,
  output state_t s_out
);
  for (genvar r = 0; r < 4; r++) begin : g_row
    logic [31:0] row_in, row_out;
    assign row_in = {s_in[r], s_in[r+4], s_in[r+8], s_in[r+12]};
    rot_feynman #(.W(32), .RIGHT(1'b0)) u_rot (
      .x(row_in), .amt(5'(8 * r)), .y(row_out)
    );
    assign {s_out[r], s_out[r+4], s_out[r+8], s_out[r+12]} = row_out;
  end
endmodule
