// aes_ctrl: controller FSM of the AES-128 core.
//
// IDLE waits for start. INIT takes 2 cycles: cycle 0 reads plaintext and key
// from the input registers, cycle 1 does the initial AddRoundKey. ROUND runs
// ten times for 9 cycles each (cycle counter cyc = 0..8):
//   cyc 0-3  the four ByteSub lanes process state column cyc into the lane
//            register
//   cyc 1-4  the lane register is written back into column cyc-1
//   cyc 5    no operation
//   cyc 6    the lanes compute SubWord(RotWord(w3)) for the KeySchedule
//   cyc 7    the key register takes the next round key; rcon doubles
//   cyc 8    ShiftRow + MixColumn + AddRoundKey (no MixColumn in round 10)
// OUT (1 cycle) writes the output register. start to output: 2 + 90 + 1 =
// 93 cycles. The 2-cycle start, the 9-cycle round, KeySchedule in cycles 7
// and 8 and the 1-cycle output come from the paper; the placement of the
// ByteSub cycles and the idle cycle 6 (cyc 5) are this design's choice.
// rst is synchronous and returns to IDLE from any state. Controls are Moore
// outputs decoded from the state and counters.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output ctrl_t ctl,
  output byte_t rcon,
  output logic  busy
);
  typedef enum logic [1:0] {IDLE, INIT, ROUND, OUT} state_e;

  state_e     st;
  logic [3:0] cyc;
  logic [3:0] rnd;

  always_ff @(posedge clk) begin
    if (rst) begin
      st   <= IDLE;
      cyc  <= '0;
      rnd  <= '0;
      rcon <= 8'h01;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          st  <= INIT;
          cyc <= '0;
        end
        INIT: if (cyc == 4'd1) begin
          st   <= ROUND;
          cyc  <= '0;
          rnd  <= 4'd1;
          rcon <= 8'h01;
        end else cyc <= cyc + 4'd1;
        ROUND: begin
          if (cyc == 4'd7) rcon <= xtime(rcon);
          if (cyc == 4'd8) begin
            cyc <= '0;
            if (rnd == 4'd10) st <= OUT;
            else rnd <= rnd + 4'd1;
          end else cyc <= cyc + 4'd1;
        end
        OUT: st <= IDLE;
      endcase
    end
  end

  always_comb begin
    ctl           = '0;
    ctl.load      = (st == INIT)  && (cyc == 4'd0);
    ctl.ark0      = (st == INIT)  && (cyc == 4'd1);
    ctl.sb_en     = (st == ROUND) && (cyc <= 4'd3);
    ctl.sb_col    = ctl.sb_en ? cyc[1:0] : 2'd0;
    ctl.wr_en     = (st == ROUND) && (cyc >= 4'd1) && (cyc <= 4'd4);
    ctl.wr_col    = ctl.wr_en ? 2'(cyc - 4'd1) : 2'd0;
    ctl.key_sb    = (st == ROUND) && (cyc == 4'd6);
    ctl.key_upd   = (st == ROUND) && (cyc == 4'd7);
    ctl.lin       = (st == ROUND) && (cyc == 4'd8);
    ctl.final_rnd = (st == ROUND) && (rnd == 4'd10);
    ctl.out_we    = (st == OUT);
    busy          = (st != IDLE);
  end

  // The lanes serve either the data or the KeySchedule in a cycle.
  a_lanes_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(ctl.sb_en && ctl.key_sb));
  // Every round is exactly 9 cycles: ShiftRow/MixColumn/AddRoundKey comes
  // 8 cycles after the first ByteSub column.
  a_round_len: assert property (@(posedge clk) disable iff (rst)
    (ctl.sb_en && ctl.sb_col == 2'd0) |-> ##8 ctl.lin);
endmodule
