// Rotator for a W-bit word, by a run-time amount.
//
// The reference drawing rotates by one position using a column of Feynman
// gates whose target inputs are tied to 0 (each gate copies its bit to the
// next position) and repeats that N times. Here the N repetitions are folded
// into log2(W) stages: stage k rotates by 2^k positions when bit k of amt is
// set, which gives the same result as N single-position rotations.
// RIGHT = 1 rotates toward bit 0 (bit 0 moves to bit W-1); RIGHT = 0 rotates
// toward the MSB. An amount of W or more wraps modulo W only when W is a
// power of two; amt is AW bits wide. Purely combinational.
module rot_feynman #(
  parameter int W     = 8,
  parameter bit RIGHT = 1'b1,
  parameter int AW    = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  x,
  input  logic [AW-1:0] amt,
  output logic [W-1:0]  y
);
  logic [W-1:0] stage [AW+1];

  assign stage[0] = x;

  for (genvar k = 0; k < AW; k++) begin : g_stage
    localparam int SH = (2**k) % W;
    logic [W-1:0] rot;
    if (SH == 0) begin : g_id
      assign rot = stage[k];
    end else if (RIGHT) begin : g_r
      assign rot = {stage[k][SH-1:0], stage[k][W-1:SH]};
    end else begin : g_l
      assign rot = {stage[k][W-SH-1:0], stage[k][W-1:W-SH]};
    end
    assign stage[k+1] = amt[k] ? rot : stage[k];
  end

  assign y = stage[AW];
endmodule
