// aes_pkg: constants, types and small functions shared by the AES-128 core.
//
// The composite-field S-box works in GF((2^4)^2): GF(2^4) is built with
// Q(y) = y^4 + y + 1 and the upper field with P(x) = x^2 + x + w^14, where
// w^14 = 4'b1001. An element {a1,a0} of GF((2^4)^2) stands for a1*x + a0.
//
// Bit matrices are stored as 8 row bytes: row r gives output bit 7-r, and
// bit j of the row byte selects input bit j (so the matrices read exactly as
// printed, top row = MSB). T is the GF(2^8) -> GF((2^4)^2) isomorphism that
// maps x to {5,9}; ATINV is A * T^-1 with A the FIPS-197 affine matrix, so
// the S-box is ATINV * inv(T * a) + 8'h63. AFF_LIN is A alone: it is what a
// masked S-box does to the additive mask.
//
// The 128-bit state follows FIPS-197: byte n sits in bits [127-8n -: 8] and
// byte n is row n%4 of column n/4.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   nib_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  localparam byte_t T_ROWS     [8] = '{8'ha0, 8'hd2, 8'h0c, 8'ha2, 8'h16, 8'h74, 8'h48, 8'h7b};
  localparam byte_t ATINV_ROWS [8] = '{8'h4e, 8'h70, 8'h96, 8'hc9, 8'h6f, 8'h6d, 8'hd3, 8'h8f};
  localparam byte_t AFF_ROWS   [8] = '{8'hf8, 8'h7c, 8'h3e, 8'h1f, 8'h8f, 8'hc7, 8'he3, 8'hf1};
  localparam byte_t AFF_CONST      = 8'h63;

  // Per-cycle controls from the round controller to the datapath.
  typedef struct packed {
    logic       load;       // read input registers (and apply the initial mask)
    logic       ark0;       // initial AddRoundKey
    logic       sb_en;      // ByteSub lanes work on column sb_col of the state
    logic [1:0] sb_col;
    logic       wr_en;      // lane register written back into column wr_col
    logic [1:0] wr_col;
    logic       key_sb;     // lanes compute SubWord(RotWord(w3))
    logic       key_upd;    // key register takes the next round key
    logic       lin;        // ShiftRow + MixColumn + AddRoundKey
    logic       final_rnd;  // MixColumn is skipped in this round
    logic       out_we;     // write the output register
  } ctrl_t;

  // y = M * x over GF(2), M given as row bytes (see above).
  function automatic byte_t mat8(input byte_t rows [8], input byte_t x);
    byte_t y;
    for (int r = 0; r < 8; r++) y[7-r] = ^(rows[r] & x);
    return y;
  endfunction

  // Multiplication by 02 in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t get_byte(input block_t s, input int n);
    return s[127-8*n -: 8];
  endfunction

  // ShiftRow: row r of the state is rotated left by r columns.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = s[127-8*(4*((c+r)%4)+r) -: 8];
    return o;
  endfunction

endpackage
