// gf4_inv: multiplicative inverse in GF(2^4), Q(y) = y^4 + y + 1, as a
// 16-entry look-up table, which is how the paper inverts in the subfield.
//
// Entry i is the element j with i*j = 1; entry 0 is 0 so that the S-box maps
// 0 to 8'h63. Combinational.
module gf4_inv (
  input  logic [3:0] a,
  output logic [3:0] r
);
  always_comb begin
    unique case (a)
      4'h0: r = 4'h0;  4'h1: r = 4'h1;  4'h2: r = 4'h9;  4'h3: r = 4'he;
      4'h4: r = 4'hd;  4'h5: r = 4'hb;  4'h6: r = 4'h7;  4'h7: r = 4'h6;
      4'h8: r = 4'hf;  4'h9: r = 4'h2;  4'ha: r = 4'hc;  4'hb: r = 4'h5;
      4'hc: r = 4'ha;  4'hd: r = 4'h4;  4'he: r = 4'h3;  4'hf: r = 4'h8;
    endcase
  end
endmodule
