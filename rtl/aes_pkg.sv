// aes_pkg: types, sizes and GF(2^8) helpers shared by the AES-128 core.
//
// A 128-bit block is held in one vector with byte 0 of the FIPS-197 byte
// order in bits [127:120] and byte 15 in bits [7:0]. The state matrix is
// filled column by column, so state row r, column c is byte 4*c + r.
// The S-box tables are not typed in; they are computed at elaboration by
// sbox_table() from the definition of the S-box: the multiplicative inverse
// in GF(2^8) modulo m(x) = x^8 + x^4 + x^3 + x + 1, followed by the affine
// transform b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The inverse table is the forward table read backwards.
package aes_pkg;

  localparam int unsigned NR     = 10;  // rounds for a 128-bit key
  localparam int unsigned WORD_W = 32;  // width of the burst ports
  localparam int unsigned BLK_W  = 128; // block and key size

  typedef logic [7:0]        byte_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [BLK_W-1:0]  block_t;
  typedef logic [3:0]       round_t;     // 0 .. NR
  typedef logic [255:0][7:0] sbox_tab_t;

  typedef enum logic {MODE_ENC = 1'b0, MODE_DEC = 1'b1} mode_e;

  // byte i (0..15) of a block, FIPS-197 order
  function automatic byte_t get_byte(block_t b, int unsigned i);
    return b[127 - 8*i -: 8];
  endfunction

  // multiply by {02} modulo m(x): shift and conditional xor with 8'h1b
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // general GF(2^8) product, shift-and-add with xtime
  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // multiplicative inverse as a^254 (0 maps to 0)
  function automatic byte_t ginv(byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    // 254 = 8'b1111_1110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, s);
      s = gmul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t r1 = {b[6:0], b[7]};
    byte_t r2 = {b[5:0], b[7:6]};
    byte_t r3 = {b[4:0], b[7:5]};
    byte_t r4 = {b[3:0], b[7:4]};
    return b ^ r1 ^ r2 ^ r3 ^ r4 ^ 8'h63;
  endfunction

  // Forward (inverse = 0) or inverse (inverse = 1) S-box contents.
  function automatic sbox_tab_t sbox_table(bit inverse);
    sbox_tab_t t;
    for (int x = 0; x < 256; x++) begin
      byte_t y = affine(ginv(byte_t'(x)));
      if (inverse) t[y] = byte_t'(x);
      else         t[x] = y;
    end
    return t;
  endfunction

endpackage
