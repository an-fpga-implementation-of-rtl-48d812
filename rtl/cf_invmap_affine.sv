// cf_invmap_affine: inverse composite field transformation merged with the
// AES affine transformation, s = A * T^-1 * b + 8'h63.
//
// The paper combines T^-1 with the affine step; the merged matrix is the
// product of T^-1 and the FIPS-197 affine matrix A over GF(2). Combinational.
module cf_invmap_affine
  import aes_pkg::*;
(
  input  byte_t b,
  output byte_t s
);
  assign s = mat8(ATINV_ROWS, b) ^ AFF_CONST;
endmodule
