// Shared types and constants for the dynamic S-box generator and the AES-128
// encryption datapath that uses it.
//
// Byte ordering follows the usual AES convention: a 128-bit block is a packed
// array of 16 bytes with byte 0 in bits [127:120]; state byte i is row i%4,
// column i/4. The 256-entry S-box is likewise a packed array with entry 0 in
// the top byte, so the whole table read as a 2048-bit vector lists entries
// 0..255 from left to right.
package dsbox_pkg;

  localparam int CHUNK_W  = 128;  // message/key chunk the S-box is built from
  localparam int NBYTES   = 16;   // bytes in one chunk / one AES state
  localparam int SBOX_N   = 256;  // entries in the S-box
  localparam int AES_NR   = 10;   // rounds of AES-128

  typedef logic [7:0]               byte_t;
  typedef logic [0:NBYTES-1][7:0]   state_t;
  typedef logic [0:SBOX_N-1][7:0]   sbox_t;

endpackage
