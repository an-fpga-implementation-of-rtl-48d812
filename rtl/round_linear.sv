// round_linear: the three linear round steps done in one clock cycle:
// ShiftRow (only wiring), MixColumn on the four columns, AddRoundKey (128
// XORs). In the final round MixColumn is bypassed. The core also runs its
// mask register through a second instance with rkey = 0, since the linear
// steps act on the mask exactly as on the data. Combinational.
module round_linear
  import aes_pkg::*;
(
  input  block_t state,
  input  block_t rkey,
  input  logic   final_rnd,
  output block_t out
);
  block_t sr, mc;

  assign sr = shift_rows(state);

  for (genvar c = 0; c < 4; c++) begin : g_mc
    mixcolumn u_mc (.col(sr[127-32*c -: 32]), .out(mc[127-32*c -: 32]));
  end

  assign out = (final_rnd ? sr : mc) ^ rkey;
endmodule
