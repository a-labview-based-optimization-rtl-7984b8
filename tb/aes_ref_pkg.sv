// aes_ref_pkg: software reference model of AES-128 used by the testbenches.
//
// Written independently of the RTL: GF(2^8) products are formed as a
// carry-less 15-bit product reduced by 0x11b, the S-box inverse is found
// by searching for the partner whose product is 1, and the affine
// transform is written bit by bit (b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^
// b_(i+7) ^ c_i, c = 0x63). The cipher, key expansion and inverse cipher
// follow FIPS-197 on a 16-byte array s[4*c + r]. Call build() once before
// using the S-box tables.
package aes_ref_pkg;

  typedef bit [7:0]   u8;
  typedef bit [127:0] u128;
  typedef u128        ks_t [11];

  u8  sb  [256];
  u8  isb [256];

  function automatic u8 rmul(u8 a, u8 b);
    bit [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11b) << (i - 8);
    return p[7:0];
  endfunction

  function automatic u8 rsbox_calc(u8 x);
    u8 inv = 0;
    u8 r;
    u8 c = 8'h63;
    if (x != 0)
      for (int y = 1; y < 256; y++) if (rmul(x, u8'(y)) == 8'h01) inv = u8'(y);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ c[i];
    return r;
  endfunction

  function automatic void build();
    for (int x = 0; x < 256; x++) begin
      sb[x] = rsbox_calc(u8'(x));
      isb[sb[x]] = u8'(x);
    end
  endfunction

  function automatic u8 bget(u128 v, int i);
    return v[127 - 8*i -: 8];
  endfunction

  function automatic u128 sub_bytes(u128 v, bit inv);
    u128 o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = inv ? isb[bget(v, i)] : sb[bget(v, i)];
    return o;
  endfunction

  function automatic u128 shift_rows(u128 v, bit inv);
    u128 o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        int d = inv ? (c + r) % 4 : (c + 4 - r) % 4;   // destination column
        o[127 - 8*(4*d + r) -: 8] = bget(v, 4*c + r);
      end
    return o;
  endfunction

  function automatic u128 mix_columns(u128 v, bit inv);
    u128 o;
    u8 m [4];
    m = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        u8 acc = 0;
        for (int k = 0; k < 4; k++) acc ^= rmul(m[(k - r + 4) % 4], bget(v, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  function automatic ks_t expand(u128 key);
    ks_t ks;
    bit [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      bit [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) ks[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return ks;
  endfunction

  function automatic u128 encrypt(u128 key, u128 pt);
    ks_t ks = expand(key);
    u128 s = pt ^ ks[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= ks[r];
    end
    return s;
  endfunction

  function automatic u128 decrypt(u128 key, u128 ct);
    ks_t ks = expand(key);
    u128 s = ct ^ ks[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ ks[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic u128 rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
