// tb_aes_top: end-to-end test of the coprocessor at its default (masked)
// configuration. Encrypts the FIPS-197 vectors and random blocks through
// the input registers and checks ct_out against a software AES-128 and the
// 93-cycle latency from the clock edge that samples start to the edge that
// writes ct_out. It also exercises, and counts, each mechanism: masking
// (the state register never holds the true round state, and two runs of
// the same block use different masks), reseeding, a reset that aborts an
// encryption, a start ignored while busy, input registers reloaded during
// an encryption, and back-to-back encryptions.
module tb_aes_top;
  import aes_ref_pkg::*;
  logic clk = 0, rst, load, start, seed_we, done, busy;
  logic [127:0] pt_in, key_in, seed, ct_out;
  int checks = 0, failures = 0;
  int n_enc = 0, n_masked_ok = 0, n_fresh = 0, n_reseed = 0, n_abort = 0,
      n_ignored = 0, n_reload = 0, n_b2b = 0;

  aes_top dut (.clk, .rst, .load, .pt_in, .key_in, .start, .seed_we, .seed,
               .ct_out, .done, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_regs(input logic [127:0] p, input logic [127:0] k);
    @(negedge clk);
    pt_in = p; key_in = k; load = 1;
    @(negedge clk);
    load = 0;
  endtask

  // start and wait for done; returns the number of edges from start to ct_out
  task automatic run(output int n, input bit reload_mid = 0, input bit restart_mid = 0);
    logic [127:0] true_st;
    @(negedge clk) start = 1;
    @(posedge clk); #1;
    start = 0;
    n = 0;
    while (!done && n < 300) begin
      @(posedge clk); #1;
      n++;
      if (n == 10 && reload_mid) begin
        pt_in = '1; key_in = '1; load = 1;
        @(posedge clk); #1;
        load = 0; n++;
        n_reload++;
      end
      if (n == 20 && restart_mid) begin
        start = 1;
        @(posedge clk); #1;
        start = 0; n++;
        n_ignored++;
      end
      // masking: the state register never equals the true state
      true_st = dut.u_core.st ^ dut.u_core.mk;
      if (busy && dut.u_core.mk != '0 && dut.u_core.st != true_st) n_masked_ok++;
    end
  endtask

  task automatic encrypt(input logic [127:0] p, input logic [127:0] k, input logic [127:0] e,
                         input bit reload_mid = 0, input bit restart_mid = 0);
    int n;
    load_regs(p, k);
    run(n, reload_mid, restart_mid);
    check(n == 93, $sformatf("latency %0d, expected 93", n));
    check(ct_out === e, $sformatf("ct %h, expected %h", ct_out, e));
    n_enc++;
  endtask

  initial begin
    logic [127:0] mk_first;
    int n;
    rst = 1; load = 0; start = 0; seed_we = 0; seed = '0; pt_in = '0; key_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            128'h3925841d02dc09fbdc118597196a0b32);
    encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);

    // same block twice: the masks must differ, the result must not
    load_regs(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 2; i++) begin
      @(negedge clk) start = 1;
      @(posedge clk); #1 start = 0;
      @(posedge clk); #1;            // mask register loaded
      if (i == 0) mk_first = dut.u_core.mk;
      else if (dut.u_core.mk != mk_first) n_fresh++;
      while (!done) @(posedge clk);
      #1 check(ct_out === 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "repeat encryption");
    end

    // reseed, then encrypt
    @(negedge clk) seed = {$urandom, $urandom, $urandom, $urandom}; seed_we = 1;
    @(negedge clk) seed_we = 0;
    n_reseed++;
    encrypt(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
            128'h3925841d02dc09fbdc118597196a0b32);

    // reset in mid-encryption: no done, back to idle, next encryption fine
    load_regs(128'h0, 128'h0);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    repeat (40) @(negedge clk);
    rst = 1;
    @(negedge clk) rst = 0;
    check(!busy && !done, "reset did not abort");
    repeat (100) begin @(posedge clk); #1 check(!done, "done after abort"); end
    n_abort++;

    // input registers reloaded and start pulsed while busy: no effect on the run
    begin
      logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, r_aes128(p, k), 1'b1, 1'b1);
      // the reloaded registers are used by the next start, back to back
      @(negedge clk) start = 1;
      @(posedge clk); #1 start = 0;
      n = 0;
      while (!done && n < 300) begin @(posedge clk); #1 n++; end
      check(n == 93 && ct_out === r_aes128('1, '1), "reloaded block");
      n_b2b++;
    end

    for (int i = 0; i < 6; i++) begin
      logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      logic [127:0] k = {$urandom, $urandom, $urandom, $urandom};
      encrypt(p, k, r_aes128(p, k));
    end

    $display("mechanisms: encryptions=%0d masked_cycles=%0d fresh_masks=%0d reseeds=%0d aborts=%0d ignored_starts=%0d reloads=%0d back_to_back=%0d",
             n_enc, n_masked_ok, n_fresh, n_reseed, n_abort, n_ignored, n_reload, n_b2b);
    check(n_enc > 0, "no encryption");
    check(n_masked_ok > 0, "masking never seen");
    check(n_fresh > 0, "masks never fresh");
    check(n_reseed > 0 && n_abort > 0 && n_ignored > 0 && n_reload > 0 && n_b2b > 0,
          "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
