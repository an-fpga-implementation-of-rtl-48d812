// gf4_sq: squarer in GF(2^4) with Q(y) = y^4 + y + 1.
//
// (a3 y^3 + a2 y^2 + a1 y + a0)^2 = a3 y^6 + a2 y^4 + a1 y^2 + a0, and with
// y^4 = y + 1, y^6 = y^3 + y^2 this is {a3, a3^a1, a2, a2^a0}: two XOR gates,
// as the paper counts. Combinational.
module gf4_sq (
  input  logic [3:0] a,
  output logic [3:0] s
);
  assign s = {a[3], a[3] ^ a[1], a[2], a[2] ^ a[0]};
endmodule
