// gf4_mul: multiplier in GF(2^4) with Q(y) = y^4 + y + 1.
//
// Mastrovito form: the product p = a*b is the 4x4 matrix Z(a) times b, where
// column j of Z(a) is a*y^j already reduced with y^4 = y + 1. The columns are
// computed from a with XORs, then each product bit is the XOR of the ANDs of
// one matrix row with b. Purely combinational. The Mastrovito method is the
// one the S-box design names; the bit-level layout is this design's.
module gf4_mul (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] p
);
  logic [3:0] z0, z1, z2, z3;   // a*y^0 .. a*y^3, reduced

  always_comb begin
    z0 = a;
    z1 = {a[2], a[1], a[0] ^ a[3], a[3]};
    z2 = {z1[2], z1[1], z1[0] ^ z1[3], z1[3]};
    z3 = {z2[2], z2[1], z2[0] ^ z2[3], z2[3]};
    for (int i = 0; i < 4; i++)
      p[i] = (z0[i] & b[0]) ^ (z1[i] & b[1]) ^ (z2[i] & b[2]) ^ (z3[i] & b[3]);
  end
endmodule
