// Reference models used by the testbenches, written independently of the RTL
// structure: plain integer arithmetic, no gate-level decomposition.
//   ref_mix      per-byte step: (ror(a, ones) + ror(a, zeros)) mod 256
//   ref_seed     seed byte of a 128-bit message/key pair
//   ref_lfsr     one step of the taps-[8,4,3,2,1] LFSR
//   ref_table    the 256-entry dynamic table grown from a seed
//   ref_gmul     GF(2^8) product by carry-less multiply and long division
//   std_sbox     the standard AES S-box, from inverse + affine map
//   ref_aes      AES-128 encryption with a given table
package tb_ref_pkg;

  typedef logic [7:0]         b8_t;
  typedef logic [0:255][7:0]  tbl_t;
  typedef logic [0:15][7:0]   blk_t;

  function automatic b8_t ref_ror(b8_t a, int n);
    n = n % 8;
    return b8_t'((a >> n) | (a << (8 - n)));
  endfunction

  function automatic b8_t ref_mix(b8_t a);
    int o;
    o = $countones(a);
    return b8_t'(int'(ref_ror(a, o)) + int'(ref_ror(a, 8 - o)));
  endfunction

  function automatic b8_t ref_seed(logic [127:0] m, logic [127:0] k);
    logic [127:0] x;
    int s;
    x = m ^ k;
    s = 0;
    for (int i = 0; i < 16; i++) s += int'(ref_mix(x[127-8*i -: 8]));
    return b8_t'(s % 256);
  endfunction

  function automatic b8_t ref_lfsr(b8_t s);
    return {s[6:0], ^(s & 8'b1000_1110)};
  endfunction

  function automatic tbl_t ref_table(b8_t seed);
    tbl_t t;
    b8_t  v;
    v = (seed == 0) ? 8'h01 : seed;
    for (int i = 0; i < 255; i++) begin
      t[i] = v;
      v = ref_lfsr(v);
    end
    t[255] = 8'h00;
    return t;
  endfunction

  function automatic b8_t ref_gmul(b8_t a, b8_t b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic tbl_t std_sbox();
    tbl_t t;
    for (int x = 0; x < 256; x++) begin
      b8_t inv, y;
      inv = 0;
      for (int c = 1; c < 256; c++) if (x != 0 && ref_gmul(b8_t'(x), b8_t'(c)) == 1) inv = b8_t'(c);
      for (int i = 0; i < 8; i++)
        y[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i);
      t[x] = y;
    end
    return t;
  endfunction

  function automatic blk_t ref_shift(blk_t s);
    blk_t o;
    for (int i = 0; i < 16; i++) o[i] = s[(i + 4 * (i % 4)) % 16];
    return o;
  endfunction

  function automatic blk_t ref_mixcol(blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++) begin
      b8_t a0, a1, a2, a3;
      a0 = s[4*c]; a1 = s[4*c+1]; a2 = s[4*c+2]; a3 = s[4*c+3];
      o[4*c]   = ref_gmul(2, a0) ^ ref_gmul(3, a1) ^ a2 ^ a3;
      o[4*c+1] = a0 ^ ref_gmul(2, a1) ^ ref_gmul(3, a2) ^ a3;
      o[4*c+2] = a0 ^ a1 ^ ref_gmul(2, a2) ^ ref_gmul(3, a3);
      o[4*c+3] = ref_gmul(3, a0) ^ a1 ^ a2 ^ ref_gmul(2, a3);
    end
    return o;
  endfunction

  function automatic blk_t ref_key_next(blk_t k, b8_t rc, tbl_t t);
    blk_t o;
    b8_t tmp [4];
    tmp[0] = t[k[13]] ^ rc; tmp[1] = t[k[14]]; tmp[2] = t[k[15]]; tmp[3] = t[k[12]];
    for (int i = 0; i < 16; i++) o[i] = k[i] ^ ((i < 4) ? tmp[i] : o[i-4]);
    return o;
  endfunction

  function automatic blk_t ref_aes(blk_t pt, blk_t key, tbl_t t);
    blk_t s, k;
    b8_t rc;
    s = pt ^ key;
    k = key;
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      k = ref_key_next(k, rc, t);
      rc = ref_gmul(rc, 8'h02);
      for (int i = 0; i < 16; i++) s[i] = t[s[i]];
      s = ref_shift(s);
      if (r < 10) s = ref_mixcol(s);
      s = s ^ k;
    end
    return s;
  endfunction

endpackage
