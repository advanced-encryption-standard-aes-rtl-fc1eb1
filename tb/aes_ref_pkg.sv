// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for the
// multiplicative inverse and applying the affine map bit by bit, the
// inverse S-box by inverting that table, and decryption uses the straight
// Inverse Cipher of FIPS-197 (not the Equivalent Inverse Cipher the RTL
// uses), so both key orders and both round orders are cross-checked.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= (16'h11b << (i - 8));
    return p[7:0];
  endfunction

  // S-box of x computed from its definition: inverse found by search, then
  // the affine map bit by bit.
  function automatic logic [7:0] calc_sbox(input logic [7:0] x);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int y = 1; y < 256; y++) if (ref_gmul(x, 8'(y)) == 8'h01) inv = 8'(y);
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ 1'((8'h63 >> i) & 8'h01);
    return s;
  endfunction

  // Tables filled on first use, so each entry is computed only once.
  logic [7:0] sbox_tab [256];
  logic [7:0] inv_tab  [256];
  bit         tab_ready = 1'b0;

  function automatic void build_tables();
    for (int x = 0; x < 256; x++) begin
      sbox_tab[x] = calc_sbox(8'(x));
      inv_tab[sbox_tab[x]] = 8'(x);
    end
    tab_ready = 1'b1;
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    if (!tab_ready) build_tables();
    return sbox_tab[x];
  endfunction

  function automatic logic [7:0] ref_inv_sbox(input logic [7:0] s);
    if (!tab_ready) build_tables();
    return inv_tab[s];
  endfunction

  function automatic logic [7:0] bget(input blk_t b, input int k);
    return b[127 - 8*k -: 8];
  endfunction

  function automatic blk_t ref_sub(input blk_t b, input bit dec);
    blk_t o;
    for (int k = 0; k < 16; k++)
      o[127 - 8*k -: 8] = dec ? ref_inv_sbox(bget(b, k)) : ref_sbox(bget(b, k));
    return o;
  endfunction

  // ShiftRows: s'[r][c] = s[r][(c+r) mod 4]; inverse uses (c-r) mod 4.
  function automatic blk_t ref_shift(input blk_t b, input bit dec);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127 - 8*(4*c + r) -: 8] = bget(b, 4*(dec ? (c + 4 - r) % 4 : (c + r) % 4) + r);
    return o;
  endfunction

  function automatic blk_t ref_mix(input blk_t b, input bit dec);
    blk_t o;
    logic [7:0] m [4];
    m = dec ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc;
        acc = '0;
        for (int j = 0; j < 4; j++) acc ^= ref_gmul(m[(j - r + 4) % 4], bget(b, 4*c + j));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  // Key expansion as words w[0..43], FIPS-197 Figure 11.
  function automatic void ref_expand(input blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk_t ref_encrypt(input blk_t key, input blk_t pt);
    blk_t rk [11];
    blk_t s;
    ref_expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r < 10; r++) s = ref_mix(ref_shift(ref_sub(s, 0), 0), 0) ^ rk[r];
    return ref_shift(ref_sub(s, 0), 0) ^ rk[10];
  endfunction

  // Straight Inverse Cipher, FIPS-197 Figure 12.
  function automatic blk_t ref_decrypt(input blk_t key, input blk_t ct);
    blk_t rk [11];
    blk_t s;
    ref_expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r > 0; r--) s = ref_mix(ref_sub(ref_shift(s, 1), 1) ^ rk[r], 1);
    return ref_sub(ref_shift(s, 1), 1) ^ rk[0];
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
