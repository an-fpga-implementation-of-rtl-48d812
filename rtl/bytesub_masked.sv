// bytesub_masked: AES S-box protected by the Transformed Masking Method.
//
// The input byte carries an additive (XOR) mask X: din = A ^ X. After the
// linear map T it splits into A1+X1 and A0+X0, where {X1,X0} = T*X. Before
// every non-linear step the additive mask is traded for a multiplicative
// mask Y (a non-zero GF(2^4) element): e.g. (A0+X0)*Y + X0*Y = A0*Y. So the
// inversion input is Y^2 * d, its inverse Y^-2 * d^-1, and the two output
// multipliers give Y^-1*b1 and Y^-1*b0. Adding X1*Y^-1 (X0*Y^-1) and
// multiplying by Y restores the additive masks, so the block returns
//   dout = S(A) ^ (A_lin * X)
// with A_lin the linear part of the affine transformation. No unmasked
// intermediate value appears on any wire. Compared with the plain S-box
// there are 12 more multipliers and 6 more adders. Operand placement follows
// the paper's figure of the secure ByteSub; the mask operands are inputs,
// computed by mask_prep. Purely combinational.
module bytesub_masked
  import aes_pkg::*;
(
  input  byte_t din,     // A ^ X
  input  nib_t  x1,      // high nibble of T*X
  input  nib_t  x0,      // low nibble of T*X
  input  nib_t  x1px0,   // X1 + X0
  input  nib_t  x1sqw,   // X1^2 * w^14
  input  nib_t  y,       // multiplicative mask, non-zero
  input  nib_t  y2,      // Y^2
  input  nib_t  yinv,    // Y^-1
  output byte_t dout     // S(A) ^ (A_lin * X)
);
  byte_t t;
  nib_t  h, l;                       // A1+X1, A0+X0
  nib_t  hl;                         // (A1+A0) + (X1+X0)
  nib_t  hy, x1y, a1y;               // left column: Y*A1
  nib_t  hly, sxy, sy;               // right column: Y*(A1+A0)
  nib_t  ly, x0y, a0y;               // far right: Y*A0
  nib_t  hsq, hsqw, hsqwy2, x1c, q;  // middle: Y^2 * A1^2 w^14
  nib_t  pr, d, dinv;                // Y^2 * d and its inverse
  nib_t  c1, c0, x1yi, x0yi, e1, e0, b1, b0;

  cf_map u_map (.a(din), .b(t));
  assign {h, l} = t;

  // additive -> multiplicative mask on A1
  gf4_mul u_hy   (.a(h),    .b(y),  .p(hy));
  gf4_mul u_x1y  (.a(x1),   .b(y),  .p(x1y));
  assign a1y = hy ^ x1y;

  // A1+A0, multiplicatively masked
  assign hl = h ^ l;
  gf4_mul u_hly  (.a(hl),    .b(y), .p(hly));
  gf4_mul u_sxy  (.a(x1px0), .b(y), .p(sxy));
  assign sy = hly ^ sxy;

  // A0, multiplicatively masked
  gf4_mul u_ly   (.a(l),  .b(y), .p(ly));
  gf4_mul u_x0y  (.a(x0), .b(y), .p(x0y));
  assign a0y = ly ^ x0y;

  // A1^2 w^14 * Y^2
  gf4_sq      u_sq  (.a(h),   .s(hsq));
  gf4_mul_w14 u_w14 (.a(hsq), .p(hsqw));
  gf4_mul u_y2   (.a(hsqw),  .b(y2), .p(hsqwy2));
  gf4_mul u_x1c  (.a(x1sqw), .b(y2), .p(x1c));
  assign q = hsqwy2 ^ x1c;

  // Y^2 * A0 (A1+A0), sum, inversion
  gf4_mul u_pr   (.a(sy), .b(a0y), .p(pr));
  assign d = q ^ pr;
  gf4_inv u_inv  (.a(d), .r(dinv));

  // Y^-1 * b1, Y^-1 * b0
  gf4_mul u_c1   (.a(a1y), .b(dinv), .p(c1));
  gf4_mul u_c0   (.a(sy),  .b(dinv), .p(c0));

  // multiplicative -> additive mask
  gf4_mul u_x1yi (.a(x1), .b(yinv), .p(x1yi));
  gf4_mul u_x0yi (.a(x0), .b(yinv), .p(x0yi));
  assign e1 = c1 ^ x1yi;
  assign e0 = c0 ^ x0yi;
  gf4_mul u_b1   (.a(e1), .b(y), .p(b1));
  gf4_mul u_b0   (.a(e0), .b(y), .p(b0));

  cf_invmap_affine u_back (.b({b1, b0}), .s(dout));
endmodule
