// tb_round_linear: the round-1 step of the FIPS-197 Appendix B example
// (after SubBytes -> start of round 2) and random states/keys in normal and
// final mode against ShiftRows, MixColumns and AddRoundKey written out here.
module tb_round_linear;
  import aes_ref_pkg::*;
  logic [127:0] state, rkey, out;
  logic final_rnd;
  int checks = 0, failures = 0;

  round_linear dut (.state, .rkey, .final_rnd, .out);

  task automatic chk(input logic [127:0] e);
    #1;
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL final=%0d in=%h: %h, expected %h", final_rnd, state, out, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state = 128'hd42711aee0bf98f1b8b45de51e415230;
    rkey  = 128'ha0fafe1788542cb123a339392a6c7605;
    final_rnd = 1'b0;
    chk(128'ha49c7ff2689f352b6b5bea43026a5049);
    for (int i = 0; i < 500; i++) begin
      state = {$urandom, $urandom, $urandom, $urandom};
      rkey  = {$urandom, $urandom, $urandom, $urandom};
      final_rnd = 1'(i % 2);
      chk((final_rnd ? r_shift_rows(state) : r_mix_columns(r_shift_rows(state))) ^ rkey);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
