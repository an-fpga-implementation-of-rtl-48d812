// tb_aes_core: runs the masked core (default) and the unmasked variant side
// by side with fresh random bits every cycle. Checks the FIPS-197
// Appendix B and C.1 vectors and random plaintext/key pairs against a
// software AES-128, the 93-cycle latency from start to the output write,
// and, after every round of the masked core, that state ^ mask equals the
// true round state while the state register alone does not.
module tb_aes_core;
  import aes_ref_pkg::*;
  logic clk = 0, rst, start;
  logic [127:0] pt, key, rnd, ct_m, ct_u;
  logic we_m, we_u, busy_m, busy_u;
  int checks = 0, failures = 0;
  int masked_rounds = 0, exposed = 0;

  aes_core                 dut_m (.clk, .rst, .start, .pt, .key, .rnd, .ct(ct_m), .ct_we(we_m), .busy(busy_m));
  aes_core #(.MASKED(1'b0)) dut_u (.clk, .rst, .start, .pt, .key, .rnd, .ct(ct_u), .ct_we(we_u), .busy(busy_u));

  always #5 clk = ~clk;
  always @(posedge clk) rnd <= {$urandom, $urandom, $urandom, $urandom};

  // reference round states of the current encryption
  logic [127:0] ref_st [11];
  int lin_seen;

  task automatic make_ref(input logic [127:0] p, input logic [127:0] k);
    logic [127:0] s = p ^ k, kk = k;
    logic [7:0] rc = 8'h01;
    ref_st[0] = s;
    for (int r = 1; r <= 10; r++) begin
      kk = r_next_key(kk, rc);
      rc = r_mul8(rc, 8'h02);
      s = r_shift_rows(r_sub_bytes(s));
      if (r != 10) s = r_mix_columns(s);
      s ^= kk;
      ref_st[r] = s;
    end
  endtask

  // after each linear step of the masked core compare the unmasked state
  always @(posedge clk) begin
    if (!rst && dut_m.ctl.lin) begin
      #1;
      lin_seen++;
      checks++;
      if ((dut_m.st ^ dut_m.mk) !== ref_st[lin_seen]) begin
        failures++;
        $display("FAIL round %0d: state^mask = %h, expected %h", lin_seen, dut_m.st ^ dut_m.mk, ref_st[lin_seen]);
      end
      masked_rounds++;
      if (dut_m.st === ref_st[lin_seen]) exposed++;
    end
  end

  task automatic encrypt(input logic [127:0] p, input logic [127:0] k, input logic [127:0] e);
    int n;
    pt = p; key = k;
    make_ref(p, k);
    lin_seen = 0;
    @(negedge clk) start = 1;
    @(posedge clk); #1;
    start = 0;
    n = 1;
    while (!we_m && n < 300) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 93) begin failures++; $display("FAIL latency %0d, expected 93", n); end
    checks++;
    if (!we_u) begin failures++; $display("FAIL unmasked core out of step"); end
    checks += 2;
    if (ct_m !== e) begin failures++; $display("FAIL masked ct %h expected %h", ct_m, e); end
    if (ct_u !== e) begin failures++; $display("FAIL unmasked ct %h expected %h", ct_u, e); end
    @(posedge clk); #1;
    checks++;
    if (busy_m || busy_u) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; pt = '0; key = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 20; i++) begin
      logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, r_aes128(p, k));
    end
    checks++;
    if (exposed != 0) begin failures++; $display("FAIL %0d of %0d round states unmasked", exposed, masked_rounds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
