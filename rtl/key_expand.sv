// key_expand: one AES-128 KeySchedule step.
//
// With the round key as words w0..w3 and subrot = SubWord(RotWord(w3))
// (computed by the four shared ByteSub lanes, the rotation being free
// wiring at their inputs):
//   w0' = w0 ^ subrot ^ {rcon, 24'h0}, w1' = w1 ^ w0', w2' = w2 ^ w1',
//   w3' = w3 ^ w2'
// which is 128 + 8 = 136 XOR gates. Combinational.
module key_expand
  import aes_pkg::*;
(
  input  block_t key,
  input  word_t  subrot,
  input  byte_t  rcon,
  output block_t next_key
);
  word_t w [4];
  word_t n [4];

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    n[0] = w[0] ^ subrot ^ {rcon, 24'h0};
    for (int i = 1; i < 4; i++) n[i] = w[i] ^ n[i-1];
    next_key = {n[0], n[1], n[2], n[3]};
  end
endmodule
