// aes_core: AES-128 encryption datapath with four shared ByteSub lanes and,
// with MASKED = 1 (the default), first-order masking of the data.
//
// Registers: state (128 b), mask (128 b), round key (128 b), and a 32-bit
// lane register with its 32-bit mask. Four S-box lanes serve one state
// column per cycle during ByteSub, and the rotated last key word during the
// KeySchedule; round_linear does ShiftRow, MixColumn and AddRoundKey of the
// whole state in one cycle, and key_expand the key update. The schedule comes
// from aes_ctrl: 2 cycles of start-up, ten 9-cycle rounds, 1 output cycle.
//
// Masking: when the plaintext is read it is XORed with 128 fresh random bits
// X, which are kept in the mask register. AddRoundKey leaves the mask as it
// is, ShiftRow and MixColumn are applied to the mask register as well, and a
// masked S-box lane turns mask byte m into A_lin*m, which is written back
// with the lane result. The ciphertext is state ^ mask, formed only when the
// output register is written. Each lane draws a fresh multiplicative mask Y
// every cycle; the key bytes pass the lanes with a fresh additive mask which
// is removed before the key update. The paper fixes the masked S-box and
// the principle (mask on entry, removed at the end); the mask register and
// the key-byte masks are this design's way of meeting it.
// With MASKED = 0 the lanes are plain composite-field S-boxes and the mask
// register stays 0: the unsecured implementation.
//
// rnd must carry fresh random bits every cycle: [15:0] give the four Y
// nibbles, [63:32] the key-byte masks, all 128 bits the initial mask.
module aes_core
  import aes_pkg::*;
#(
  parameter bit MASKED = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   start,
  input  block_t pt,
  input  block_t key,
  input  block_t rnd,
  output block_t ct,
  output logic   ct_we,
  output logic   busy
);
  ctrl_t  ctl;
  byte_t  rcon;
  block_t st, mk, kr;
  word_t  lane_q, lane_m;
  block_t st_lin, mk_lin, kr_next;
  word_t  lane_d, lane_mo;
  word_t  col_d, col_m, rot_w;

  aes_ctrl u_ctrl (.clk, .rst, .start, .ctl, .rcon, .busy);

  // Lane operands: a state column, or RotWord(w3) for the KeySchedule.
  assign rot_w = {kr[23:0], kr[31:24]};
  assign col_d = ctl.key_sb ? (rot_w ^ (MASKED ? rnd[63:32] : 32'h0))
                            : st[127-32*ctl.sb_col -: 32];
  assign col_m = ctl.key_sb ? (MASKED ? rnd[63:32] : 32'h0)
                            : mk[127-32*ctl.sb_col -: 32];

  for (genvar i = 0; i < 4; i++) begin : g_lane
    if (MASKED) begin : g_m
      nib_t x1, x0, x1px0, x1sqw, y, y2, yinv;
      mask_prep u_prep (
        .m(col_m[31-8*i -: 8]), .yraw(rnd[4*i +: 4]),
        .x1, .x0, .x1px0, .x1sqw, .y, .y2, .yinv,
        .mout(lane_mo[31-8*i -: 8])
      );
      bytesub_masked u_sb (
        .din(col_d[31-8*i -: 8]), .x1, .x0, .x1px0, .x1sqw, .y, .y2, .yinv,
        .dout(lane_d[31-8*i -: 8])
      );
    end else begin : g_u
      bytesub u_sb (.din(col_d[31-8*i -: 8]), .dout(lane_d[31-8*i -: 8]));
      assign lane_mo[31-8*i -: 8] = 8'h00;
    end
  end

  round_linear u_lin_d (.state(st), .rkey(kr),  .final_rnd(ctl.final_rnd), .out(st_lin));
  round_linear u_lin_m (.state(mk), .rkey('0),  .final_rnd(ctl.final_rnd), .out(mk_lin));
  key_expand   u_kexp  (.key(kr), .subrot(lane_q ^ lane_m), .rcon, .next_key(kr_next));

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= '0;
      mk     <= '0;
      kr     <= '0;
      lane_q <= '0;
      lane_m <= '0;
    end else begin
      if (ctl.load) begin
        st <= pt ^ (MASKED ? rnd : '0);
        mk <= MASKED ? rnd : '0;
        kr <= key;
      end
      if (ctl.ark0) st <= st ^ kr;
      if (ctl.sb_en || ctl.key_sb) begin
        lane_q <= lane_d;
        lane_m <= lane_mo;
      end
      if (ctl.wr_en) begin
        st[127-32*ctl.wr_col -: 32] <= lane_q;
        mk[127-32*ctl.wr_col -: 32] <= lane_m;
      end
      if (ctl.key_upd) kr <= kr_next;
      if (ctl.lin) begin
        st <= st_lin;
        mk <= mk_lin;
      end
    end
  end

  assign ct    = st ^ mk;
  assign ct_we = ctl.out_we;
endmodule
