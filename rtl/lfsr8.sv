// 8-bit Fibonacci LFSR with taps [8,4,3,2,1] (stages q[7], q[3], q[2], q[1]).
//
// The register shifts toward q[7]; the XOR of the tapped stages (two XORs in
// parallel, then one combining them) enters the rightmost stage q[0]:
//   q <= {q[6:0], q[7] ^ q[3] ^ q[2] ^ q[1]}
// This feedback has period 255 and visits every non-zero byte once. Taps,
// shift direction and feedback point follow the reference drawing; the load
// and enable controls and the reset value are this design's.
// load (priority over en) writes seed into q on the next edge; en advances one
// step. nxt is the value the next step would produce. Synchronous
// active-high reset to 8'h01.
module lfsr8 (
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  logic [7:0] seed,
  input  logic       en,
  output logic [7:0] q,
  output logic [7:0] nxt
);
  logic t12, t37;

  assign t12 = q[1] ^ q[2];
  assign t37 = q[3] ^ q[7];
  assign nxt = {q[6:0], t12 ^ t37};

  always_ff @(posedge clk) begin
    if (rst)    q <= 8'h01;
    else if (load) q <= seed;
    else if (en)   q <= nxt;
  end
endmodule
