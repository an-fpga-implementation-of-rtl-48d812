// tb_aes_top_unsecured: the coprocessor built without masking (MASKED = 0),
// the unsecured implementation the masked one extends. Encrypts the
// FIPS-197 vectors and random blocks and checks ciphertext and the same
// 93-cycle latency as the masked build.
module tb_aes_top_unsecured;
  import aes_ref_pkg::*;
  logic clk = 0, rst, load, start, seed_we, done, busy;
  logic [127:0] pt_in, key_in, seed, ct_out;
  int checks = 0, failures = 0;

  aes_top #(.MASKED(1'b0)) dut (.clk, .rst, .load, .pt_in, .key_in, .start, .seed_we, .seed,
                                .ct_out, .done, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic encrypt(input logic [127:0] p, input logic [127:0] k, input logic [127:0] e);
    int n;
    @(negedge clk);
    pt_in = p; key_in = k; load = 1;
    @(negedge clk);
    load = 0; start = 1;
    @(posedge clk); #1 start = 0;
    n = 0;
    while (!done && n < 300) begin @(posedge clk); #1 n++; end
    checks += 2;
    if (n != 93) begin failures++; $display("FAIL latency %0d", n); end
    if (ct_out !== e) begin failures++; $display("FAIL ct %h expected %h", ct_out, e); end
  endtask

  initial begin
    rst = 1; load = 0; start = 0; seed_we = 0; seed = '0; pt_in = '0; key_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 8; i++) begin
      logic [127:0] p, k;
      p = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, r_aes128(p, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
