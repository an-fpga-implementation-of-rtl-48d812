// aes_ref_pkg: reference arithmetic for the testbenches, written from the
// definitions and independent of the RTL: GF(2^4) and GF(2^8) products by
// shift-and-add, inverses by search, the S-box as inverse + FIPS-197 affine
// map, the composite-field map from its generator, and a plain AES-128.
package aes_ref_pkg;

  function automatic logic [3:0] r_mul4(input logic [3:0] a, input logic [3:0] b);
    logic [6:0] p = '0;
    for (int i = 0; i < 4; i++) if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--) if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  function automatic logic [3:0] r_inv4(input logic [3:0] a);
    for (int b = 1; b < 16; b++) if (r_mul4(a, 4'(b)) == 4'h1) return 4'(b);
    return 4'h0;
  endfunction

  function automatic logic [7:0] r_mul8(input logic [7:0] a, input logic [7:0] b);
    logic [14:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'(9'h11b) << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] r_inv8(input logic [7:0] a);
    for (int b = 1; b < 256; b++) if (r_mul8(a, 8'(b)) == 8'h01) return 8'(b);
    return 8'h00;
  endfunction

  // FIPS-197 affine transformation: b_i ^ b_(i+4) ^ b_(i+5) ^ b_(i+6) ^ b_(i+7) ^ c_i
  function automatic logic [7:0] r_affine(input logic [7:0] b);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ 1'(8'h63 >> i);
    return r;
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] a);
    return r_affine(r_inv8(a));
  endfunction

  // Product in GF((2^4)^2) with x^2 = x + w^14 (w^14 = 4'h9).
  function automatic logic [7:0] r_cmul(input logic [7:0] a, input logic [7:0] b);
    logic [3:0] hh, h, l;
    hh = r_mul4(a[7:4], b[7:4]);
    h  = r_mul4(a[7:4], b[3:0]) ^ r_mul4(a[3:0], b[7:4]) ^ hh;
    l  = r_mul4(a[3:0], b[3:0]) ^ r_mul4(hh, 4'h9);
    return {h, l};
  endfunction

  // The isomorphism GF(2^8) -> GF((2^4)^2) sending x to {5,9}: sum of the
  // powers of {5,9} selected by the bits of a.
  function automatic logic [7:0] r_map(input logic [7:0] a);
    logic [7:0] pw = 8'h01, r = 8'h00;
    for (int j = 0; j < 8; j++) begin
      if (a[j]) r ^= pw;
      pw = r_cmul(pw, 8'h59);
    end
    return r;
  endfunction

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] r_byte(input blk_t s, input int n);
    return s[127-8*n -: 8];
  endfunction

  function automatic blk_t r_sub_bytes(input blk_t s);
    blk_t o;
    for (int n = 0; n < 16; n++) o[127-8*n -: 8] = r_sbox(r_byte(s, n));
    return o;
  endfunction

  function automatic blk_t r_shift_rows(input blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = r_byte(s, 4*((c+r)%4)+r);
    return o;
  endfunction

  function automatic logic [31:0] r_mix_col(input logic [31:0] c);
    logic [7:0] a [4];
    logic [31:0] o;
    for (int r = 0; r < 4; r++) a[r] = c[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      o[31-8*r -: 8] = r_mul8(8'h02, a[r]) ^ r_mul8(8'h03, a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

  function automatic blk_t r_mix_columns(input blk_t s);
    blk_t o;
    for (int c = 0; c < 4; c++) o[127-32*c -: 32] = r_mix_col(s[127-32*c -: 32]);
    return o;
  endfunction

  function automatic blk_t r_next_key(input blk_t k, input logic [7:0] rc);
    logic [31:0] w [4];
    logic [31:0] t;
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    t = {w[3][23:0], w[3][31:24]};
    for (int i = 0; i < 4; i++) t[31-8*i -: 8] = r_sbox(t[31-8*i -: 8]);
    w[0] ^= t ^ {rc, 24'h0};
    for (int i = 1; i < 4; i++) w[i] ^= w[i-1];
    return {w[0], w[1], w[2], w[3]};
  endfunction

  function automatic blk_t r_aes128(input blk_t pt, input blk_t key);
    blk_t s = pt ^ key, k = key;
    logic [7:0] rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      k = r_next_key(k, rc);
      rc = r_mul8(rc, 8'h02);
      s = r_shift_rows(r_sub_bytes(s));
      if (r != 10) s = r_mix_columns(s);
      s ^= k;
    end
    return s;
  endfunction

endpackage
