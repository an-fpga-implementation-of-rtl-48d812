// cf_map: Composite Field Transformation, the GF(2) matrix T that carries a
// GF(2^8) element (AES polynomial basis) to GF((2^4)^2) = {a1, a0}.
//
// T is the isomorphism of the paper's field choice (Q(y) = y^4 + y + 1,
// P(x) = x^2 + x + w^14) that sends x to {4'h5, 4'h9}, one of the eight
// possible ones; the paper picks the most area-efficient of the eight and
// this is the one that fits its published matrix. Linear, combinational.
module cf_map
  import aes_pkg::*;
(
  input  byte_t a,
  output byte_t b
);
  assign b = mat8(T_ROWS, a);
endmodule
