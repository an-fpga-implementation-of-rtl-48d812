// mask_prep: mask operands for one masked S-box lane.
//
// From the byte's additive mask m (X) and a random nibble yraw it derives
// what the masked S-box takes as inputs: {X1,X0} = T*X, X1+X0, X1^2*w^14,
// Y, Y^2, Y^-1, and the mask the S-box leaves on its output, A_lin*X.
// Y must be invertible, so a zero yraw is replaced by 1. Which block
// computes these operands is this design's choice. Combinational.
module mask_prep
  import aes_pkg::*;
(
  input  byte_t m,
  input  nib_t  yraw,
  output nib_t  x1,
  output nib_t  x0,
  output nib_t  x1px0,
  output nib_t  x1sqw,
  output nib_t  y,
  output nib_t  y2,
  output nib_t  yinv,
  output byte_t mout
);
  nib_t x1sq;

  cf_map      u_map (.a(m), .b({x1, x0}));
  gf4_sq      u_xsq (.a(x1), .s(x1sq));
  gf4_mul_w14 u_w14 (.a(x1sq), .p(x1sqw));
  gf4_sq      u_ysq (.a(y), .s(y2));
  gf4_inv     u_yi  (.a(y), .r(yinv));

  assign x1px0 = x1 ^ x0;
  assign y     = (yraw == 4'h0) ? 4'h1 : yraw;
  assign mout  = mat8(AFF_ROWS, m);
endmodule
