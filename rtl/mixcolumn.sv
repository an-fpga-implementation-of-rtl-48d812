// mixcolumn: AES MixColumn of one state column.
//
// out_r = 02*c_r + 03*c_(r+1) + c_(r+2) + c_(r+3), with 03*c = 02*c + c and
// 02*c a left shift with a conditional XOR of 8'h1b (xtime). Row 0 is the top
// byte of the 32-bit column. Combinational.
module mixcolumn
  import aes_pkg::*;
(
  input  word_t col,
  output word_t out
);
  byte_t c [4];
  byte_t t [4];

  always_comb begin
    for (int r = 0; r < 4; r++) c[r] = col[31-8*r -: 8];
    for (int r = 0; r < 4; r++) t[r] = xtime(c[r]);
    for (int r = 0; r < 4; r++)
      out[31-8*r -: 8] = t[r] ^ t[(r+1)%4] ^ c[(r+1)%4] ^ c[(r+2)%4] ^ c[(r+3)%4];
  end
endmodule
