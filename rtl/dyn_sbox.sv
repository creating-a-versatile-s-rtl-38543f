// Dynamic S-box: a 256-byte substitution table that depends on the message
// and the key.
//
// On start (accepted while not busy) seed_gen reduces the selected 128-bit
// chunk of message and key to a seed byte d'. The table is then filled one
// entry per clock from an 8-bit LFSR: entry 0 is the seed itself, entry i is
// the LFSR state i steps later, for i = 0..254, which are 255 distinct
// non-zero bytes, and entry 255 is 8'h00. The table is a permutation of
// 0..255.
//
// A zero seed would lock the LFSR at zero. Such a seed is replaced by 8'h01
// and seed_fixup is raised for that build. This is this design's own choice;
// the algorithm does not treat the case.
//
// Timing: start sampled on edge 0 writes entries 0 and 255. Edges 1..254
// write entries 1..254, and done pulses (and valid rises) in the cycle after
// edge 254, i.e. 254 clocks after start. valid drops when a new build starts
// and stays high between builds. The whole table is visible on sbox (entry 0
// in the top byte) for parallel lookups. Synchronous active-high reset
// clears the table and valid.
module dyn_sbox
  import dsbox_pkg::*;
#(
  parameter int MSG_W = 128,
  parameter int KEY_W = 128,
  parameter int MSG_CHUNKS = (MSG_W + CHUNK_W - 1) / CHUNK_W,
  parameter int KEY_CHUNKS = (KEY_W + CHUNK_W - 1) / CHUNK_W,
  parameter int NCHUNK     = (MSG_CHUNKS > KEY_CHUNKS) ? MSG_CHUNKS : KEY_CHUNKS,
  parameter int CSW        = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [MSG_W-1:0] msg,
  input  logic [KEY_W-1:0] key,
  input  logic [CSW-1:0]   chunk_sel,
  output logic             busy,
  output logic             done,
  output logic             valid,
  output logic             seed_fixup,
  output logic [7:0]       seed,
  output sbox_t            sbox
);
  typedef enum logic {S_IDLE, S_FILL} fill_state_e;

  fill_state_e st;
  logic [7:0]  idx;
  logic [7:0]  raw_seed, use_seed;
  logic [7:0]  lq, lnxt;
  state_t      alpha, mixed;
  logic        go;

  seed_gen #(.MSG_W(MSG_W), .KEY_W(KEY_W)) u_seed (
    .msg(msg), .key(key), .chunk_sel(chunk_sel),
    .alpha(alpha), .mixed(mixed), .seed(raw_seed)
  );

  assign use_seed = (raw_seed == 8'h00) ? 8'h01 : raw_seed;
  assign go       = start && (st == S_IDLE);

  lfsr8 u_lfsr (
    .clk(clk), .rst(rst), .load(go), .seed(use_seed),
    .en(st == S_FILL), .q(lq), .nxt(lnxt)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= S_IDLE;
      idx        <= '0;
      done       <= 1'b0;
      valid      <= 1'b0;
      seed_fixup <= 1'b0;
      seed       <= '0;
      sbox       <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (go) begin
          sbox[0]    <= use_seed;
          sbox[255]  <= 8'h00;
          seed       <= use_seed;
          seed_fixup <= (raw_seed == 8'h00);
          valid      <= 1'b0;
          idx        <= 8'd1;
          st         <= S_FILL;
        end
        S_FILL: begin
          sbox[idx] <= lnxt;
          idx       <= idx + 8'd1;
          if (idx == 8'd254) begin
            st    <= S_IDLE;
            done  <= 1'b1;
            valid <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st == S_FILL);

  // the LFSR never reaches zero while filling
  a_lfsr_nonzero: assert property (@(posedge clk) disable iff (rst)
    (st == S_FILL) |-> (lq != 8'h00));
endmodule
