// gf4_mul_w14: multiplication by the constant w^14 = 4'b1001 in GF(2^4),
// Q(y) = y^4 + y + 1, w = y.
//
// w^14 = w^-1, so the product is a divided by y: the bits rotate down by one
// and the dropped a0 re-enters as a0 * y^-1 = a0 (y^3 + 1). One XOR gate, as
// the paper counts. Combinational.
module gf4_mul_w14 (
  input  logic [3:0] a,
  output logic [3:0] p
);
  assign p = {a[0], a[3], a[2], a[1] ^ a[0]};
endmodule
