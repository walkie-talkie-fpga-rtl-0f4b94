// tb_aes_ref_pkg: a plain behavioural AES-128 reference for the testbenches,
// written straight from the cipher's definition and sharing no code with the
// RTL. The S-box is computed (GF(2^8) inverse by search, then the affine map);
// blocks use the same byte order as the RTL (byte k = bits [127-8k -: 8],
// state row k%4, column k/4).
package tb_aes_ref_pkg;
  typedef logic [127:0] blk_t;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] b = 0;
    for (int y = 1; y < 256; y++) if (x != 0 && gmul(x, 8'(y)) == 8'h01) b = 8'(y);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    for (int x = 0; x < 256; x++) if (sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] bget(blk_t s, int r, int c);
    return s[127-8*(4*c+r) -: 8];
  endfunction

  function automatic blk_t sub_bytes(blk_t s, bit inv);
    blk_t o;
    for (int k = 0; k < 16; k++)
      o[127-8*k -: 8] = inv ? inv_sbox(s[127-8*k -: 8]) : sbox(s[127-8*k -: 8]);
    return o;
  endfunction

  function automatic blk_t shift_rows(blk_t s, bit inv);
    blk_t o;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        o[127-8*(4*c+r) -: 8] = inv ? bget(s, r, (c + 4 - r) % 4) : bget(s, r, (c + r) % 4);
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t s, bit inv);
    blk_t o;
    logic [7:0] m [4];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        logic [7:0] acc = 0;
        for (int j = 0; j < 4; j++) acc ^= gmul(m[(j - r + 4) % 4], bget(s, j, c));
        o[127-8*(4*c+r) -: 8] = acc;
      end
    return o;
  endfunction

  typedef blk_t keys_t [11];
  function automatic keys_t expand(blk_t key);
    keys_t rk;
    logic [31:0] w [44];
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t encrypt(blk_t pt, blk_t key);
    keys_t rk = expand(key);
    blk_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(blk_t ct, blk_t key);
    keys_t rk = expand(key);
    blk_t s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction
endpackage
