// tb_aes_ctrl: follows the controller through one encryption and checks
// each control against the schedule it should follow: load and ark0 in the
// 2 start-up cycles, ten 9-cycle rounds with ByteSub on columns 0-3,
// write-back of columns 0-3 one cycle later, KeySchedule in cycles 7 and 8,
// the linear step in cycle 9 (final in round 10), the rcon sequence, the
// output write 93 cycles after start, and a reset in mid-encryption.
module tb_aes_ctrl;
  import aes_pkg::*;
  logic clk = 0, rst, start, busy;
  ctrl_t ctl;
  byte_t rcon;
  int checks = 0, failures = 0;

  aes_ctrl dut (.clk, .rst, .start, .ctl, .rcon, .busy);

  always #5 clk = ~clk;

  task automatic expect_ctl(input ctrl_t e, input string what);
    checks++;
    if (ctl !== e) begin
      failures++;
      $display("FAIL %s: ctl=%p expected %p", what, ctl, e);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t e;
    byte_t rc;
    int n;
    rst = 1; start = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;
    checks++;
    if (busy !== 1'b0 || ctl !== '0) failures++;
    start = 1;
    @(posedge clk); #1;          // start sampled here: cycle 0
    start = 0;
    // start-up
    e = '0; e.load = 1'b1; expect_ctl(e, "load");
    @(posedge clk); #1;
    e = '0; e.ark0 = 1'b1; expect_ctl(e, "ark0");
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      for (int c = 0; c < 9; c++) begin
        @(posedge clk); #1;
        e = '0;
        e.sb_en     = (c <= 3);
        e.sb_col    = (c <= 3) ? 2'(c) : 2'd0;
        e.wr_en     = (c >= 1 && c <= 4);
        e.wr_col    = (c >= 1 && c <= 4) ? 2'(c - 1) : 2'd0;
        e.key_sb    = (c == 6);
        e.key_upd   = (c == 7);
        e.lin       = (c == 8);
        e.final_rnd = (r == 10);
        expect_ctl(e, $sformatf("round %0d cycle %0d", r, c + 1));
        if (c == 7) begin
          checks++;
          if (rcon !== rc) begin failures++; $display("FAIL rcon %h expected %h", rcon, rc); end
          rc = {rc[6:0], 1'b0} ^ (rc[7] ? 8'h1b : 8'h00);
        end
      end
    end
    @(posedge clk); #1;
    checks++;
    if (!ctl.out_we) begin failures++; $display("FAIL no output write in cycle 93"); end
    @(posedge clk); #1;
    checks++;
    if (busy || ctl.out_we) begin failures++; $display("FAIL not back in IDLE"); end
    // reset in the middle of an encryption
    start = 1; @(posedge clk); #1; start = 0;
    repeat (30) @(posedge clk);
    #1 rst = 1; @(posedge clk); #1 rst = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL reset did not return to IDLE"); end
    // a second full run measured by counting cycles to out_we
    start = 1; @(posedge clk); #1; start = 0;
    n = 1;
    while (!ctl.out_we && n < 200) begin @(posedge clk); #1; n++; end
    checks++;
    if (n != 93) begin failures++; $display("FAIL latency %0d, expected 93", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
