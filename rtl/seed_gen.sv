// Seed generator of the dynamic S-box: reduces a message and a key to the one
// byte d' that seeds the LFSR.
//
//  1. The message and the key are each brought to 128 bits. A value narrower
//     than 128 bits is padded with zeros appended after it (it occupies the
//     upper bits). A wider value is split into 128-bit chunks, chunk 0 being
//     the most significant; chunk_sel picks the one used (a last partial
//     chunk is zero padded in the same way).
//  2. alpha = key xor message, through a bank of Feynman gates.
//  3. Each of the 16 bytes of alpha goes through byte_mixer.
//  4. The 16 results are added in a tree of MTS-gate ripple-carry adders,
//     dropping every carry: seed = sum of d[0..15] mod 256.
// Purely combinational. Chunking and padding follow the algorithm's steps;
// where the pad goes and which chunk is used are this design's choices.
module seed_gen
  import dsbox_pkg::*;
#(
  parameter int MSG_W = 128,
  parameter int KEY_W = 128,
  parameter int MSG_CHUNKS = (MSG_W + CHUNK_W - 1) / CHUNK_W,
  parameter int KEY_CHUNKS = (KEY_W + CHUNK_W - 1) / CHUNK_W,
  parameter int NCHUNK     = (MSG_CHUNKS > KEY_CHUNKS) ? MSG_CHUNKS : KEY_CHUNKS,
  parameter int CSW        = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic [MSG_W-1:0] msg,
  input  logic [KEY_W-1:0] key,
  input  logic [CSW-1:0]   chunk_sel,
  output state_t           alpha,
  output state_t           mixed,
  output logic [7:0]       seed
);
  localparam int MSG_PW = MSG_CHUNKS * CHUNK_W;
  localparam int KEY_PW = KEY_CHUNKS * CHUNK_W;

  logic [MSG_PW-1:0]  msg_pad;
  logic [KEY_PW-1:0]  key_pad;
  logic [CHUNK_W-1:0] m_chunk, k_chunk, x_copy;

  // zero padding appended below the value
  assign msg_pad = {msg, {(MSG_PW - MSG_W){1'b0}}};
  assign key_pad = {key, {(KEY_PW - KEY_W){1'b0}}};

  always_comb begin
    m_chunk = '0;
    k_chunk = '0;
    for (int c = 0; c < MSG_CHUNKS; c++)
      if (int'(chunk_sel) == c) m_chunk = msg_pad[MSG_PW-1-c*CHUNK_W -: CHUNK_W];
    for (int c = 0; c < KEY_CHUNKS; c++)
      if (int'(chunk_sel) == c) k_chunk = key_pad[KEY_PW-1-c*CHUNK_W -: CHUNK_W];
    // a chunk index past the end of the shorter operand reuses its last chunk
    if (int'(chunk_sel) >= MSG_CHUNKS) m_chunk = msg_pad[CHUNK_W-1:0];
    if (int'(chunk_sel) >= KEY_CHUNKS) k_chunk = key_pad[CHUNK_W-1:0];
  end

  feynman_gate #(.W(CHUNK_W)) u_xor (.a(k_chunk), .b(m_chunk), .p(x_copy), .q(alpha));

  for (genvar n = 0; n < NBYTES; n++) begin : g_mix
    logic [3:0] ones, zeros;
    byte_mixer u_mix (.a(alpha[n]), .ones(ones), .zeros(zeros), .d(mixed[n]));
  end

  // adder tree: 16 bytes -> 8 -> 4 -> 2 -> 1 partial sums, one signal per
  // level
  logic [7:0] sum8 [8];
  logic [7:0] sum4 [4];
  logic [7:0] sum2 [2];
  logic [7:0] sum1;

  for (genvar n = 0; n < 8; n++) begin : g_add8
    logic        cout;
    logic [15:0] garbage;
    rc_adder #(.W(8)) u_add (.a(mixed[2*n]), .b(mixed[2*n+1]), .cin(1'b0),
                             .sum(sum8[n]), .cout(cout), .garbage(garbage));
  end
  for (genvar n = 0; n < 4; n++) begin : g_add4
    logic        cout;
    logic [15:0] garbage;
    rc_adder #(.W(8)) u_add (.a(sum8[2*n]), .b(sum8[2*n+1]), .cin(1'b0),
                             .sum(sum4[n]), .cout(cout), .garbage(garbage));
  end
  for (genvar n = 0; n < 2; n++) begin : g_add2
    logic        cout;
    logic [15:0] garbage;
    rc_adder #(.W(8)) u_add (.a(sum4[2*n]), .b(sum4[2*n+1]), .cin(1'b0),
                             .sum(sum2[n]), .cout(cout), .garbage(garbage));
  end
  logic        cout1;
  logic [15:0] garbage1;
  rc_adder #(.W(8)) u_add1 (.a(sum2[0]), .b(sum2[1]), .cin(1'b0),
                            .sum(sum1), .cout(cout1), .garbage(garbage1));

  assign seed = sum1;
endmodule
