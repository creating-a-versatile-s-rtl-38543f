// AES-128 encryption with a message- and key-dependent S-box.
//
// start (taken while idle) latches the message and key and first builds the
// dynamic S-box from them (dyn_sbox, 254 clocks). When the table is complete
// the AES core encrypts the latched message with the latched key using that
// table for SubBytes and for the key schedule (10 clocks). done then pulses
// with the ciphertext on ct, 265 clock edges after the edge that samples
// start. Every new message gives
// a new table, so every block is encrypted under its own S-box. sbox and seed
// show the table last built, entry 0 in the top byte.
//
// The key generation unit of the reference block diagram is not specified
// there, so the key is a port of this module. Synchronous active-high reset.
module dyn_aes_top
  import dsbox_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [127:0] msg,
  input  logic [127:0] key,
  output logic         busy,
  output logic         done,
  output logic [127:0] ct,
  output logic [2047:0] sbox,
  output logic [7:0]   seed
);
  typedef enum logic [1:0] {T_IDLE, T_SBOX, T_AES} top_state_e;

  top_state_e  st;
  logic [127:0] msg_q, key_q;
  logic        sb_start, sb_busy, sb_done, sb_valid, sb_fix;
  logic        aes_start, aes_busy, aes_done;
  logic [3:0]  aes_round;
  sbox_t       table_q;
  state_t      ct_s;

  assign sb_start = (st == T_IDLE) && start;

  dyn_sbox #(.MSG_W(128), .KEY_W(128)) u_sbox (
    .clk(clk), .rst(rst), .start(sb_start), .msg(msg), .key(key),
    .chunk_sel(1'b0), .busy(sb_busy), .done(sb_done), .valid(sb_valid),
    .seed_fixup(sb_fix), .seed(seed), .sbox(table_q)
  );

  assign aes_start = (st == T_SBOX) && sb_done;

  aes_encrypt u_aes (
    .clk(clk), .rst(rst), .start(aes_start), .pt(msg_q), .key(key_q),
    .sbox(table_q), .busy(aes_busy), .done(aes_done), .round(aes_round), .ct(ct_s)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= T_IDLE;
      msg_q <= '0;
      key_q <= '0;
    end else begin
      case (st)
        T_IDLE: if (start) begin
          msg_q <= msg;
          key_q <= key;
          st    <= T_SBOX;
        end
        T_SBOX: if (sb_done) st <= T_AES;
        T_AES:  if (aes_done) st <= T_IDLE;
        default: st <= T_IDLE;
      endcase
    end
  end

  assign busy = (st != T_IDLE);
  assign done = aes_done;
  assign ct   = ct_s;
  assign sbox = table_q;

  // the table must be complete before, and unchanged during, encryption
  a_sbox_ready: assert property (@(posedge clk) disable iff (rst)
    aes_start |-> sb_valid);
  a_sbox_stable: assert property (@(posedge clk) disable iff (rst)
    aes_busy |-> !sb_busy);
endmodule
