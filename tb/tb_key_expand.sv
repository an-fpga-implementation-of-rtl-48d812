// tb_key_expand: expands the FIPS-197 Appendix A.1 key through all ten
// rounds (the SubWord(RotWord) input computed here), checks round keys 1
// and 10 against the published values and every step against a reference
// expansion; then 200 random keys and round constants.
module tb_key_expand;
  import aes_ref_pkg::*;
  logic [127:0] key, next_key;
  logic [31:0]  subrot;
  logic [7:0]   rcon;
  int checks = 0, failures = 0;

  key_expand dut (.key, .subrot, .rcon, .next_key);

  function automatic logic [31:0] sub_rot(input logic [127:0] k);
    logic [31:0] t = {k[23:0], k[31:24]};
    for (int i = 0; i < 4; i++) t[31-8*i -: 8] = r_sbox(t[31-8*i -: 8]);
    return t;
  endfunction

  task automatic chk(input logic [127:0] e);
    subrot = sub_rot(key); #1;
    checks++;
    if (next_key !== e) begin
      failures++;
      $display("FAIL key=%h rcon=%h: %h, expected %h", key, rcon, next_key, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key  = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    rcon = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      chk(r_next_key(key, rcon));
      if (r == 1) begin
        checks++;
        if (next_key !== 128'ha0fafe1788542cb123a339392a6c7605) failures++;
      end
      if (r == 10) begin
        checks++;
        if (next_key !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) failures++;
      end
      key  = next_key;
      rcon = r_mul8(rcon, 8'h02);
    end
    for (int i = 0; i < 200; i++) begin
      key  = {$urandom, $urandom, $urandom, $urandom};
      rcon = 8'($urandom);
      chk(r_next_key(key, rcon));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
