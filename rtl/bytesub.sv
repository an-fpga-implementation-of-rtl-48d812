// bytesub: unsecured AES S-box computed in the composite field GF((2^4)^2).
//
// The byte is mapped by T to a1*x + a0, inverted with
//   d = a0*(a1 + a0) + a1^2 * w^14,  b1 = a1 * d^-1,  b0 = (a1 + a0) * d^-1
// (one GF(2^4) inversion by table, three multipliers, two adders, one
// squarer and one multiplication by w^14), and mapped back through the
// merged inverse transformation and affine step. The structure is the
// paper's; it is purely combinational (one S-box lane of the core).
module bytesub
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);
  byte_t a, b;
  nib_t  a1, a0, sum, a1sq, a1sqw, prod, d, dinv, b1, b0;

  assign {a1, a0} = a;
  assign sum = a1 ^ a0;
  assign d   = a1sqw ^ prod;
  assign b   = {b1, b0};

  cf_map           u_map  (.a(din), .b(a));
  gf4_sq           u_sq   (.a(a1), .s(a1sq));
  gf4_mul_w14      u_w14  (.a(a1sq), .p(a1sqw));
  gf4_mul          u_m0   (.a(sum), .b(a0), .p(prod));
  gf4_inv          u_inv  (.a(d), .r(dinv));
  gf4_mul          u_m1   (.a(a1), .b(dinv), .p(b1));
  gf4_mul          u_m2   (.a(sum), .b(dinv), .p(b0));
  cf_invmap_affine u_back (.b(b), .s(dout));
endmodule
