// tb_prng: after reset the generator must produce the xorshift64 sequence
// from SEED, after seed_we the sequence from the new seed, a zero seed must
// fall back to SEED, and the output must change every cycle.
module tb_prng;
  logic clk = 0, rst, seed_we;
  logic [63:0] seed, q, model;
  int checks = 0, failures = 0;
  localparam logic [63:0] SEED = 64'h0123456789abcdef;

  prng #(.SEED(SEED)) dut (.clk, .rst, .seed_we, .seed, .q);

  always #5 clk = ~clk;

  function automatic logic [63:0] step(input logic [63:0] x);
    x ^= x << 13;
    x ^= x >> 7;
    x ^= x << 17;
    return x;
  endfunction

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      @(posedge clk); #1;
      model = step(model);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL q=%h expected %h", q, model);
      end
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; seed_we = 0; seed = '0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (q !== SEED) failures++;
    model = SEED;
    run(100);
    seed = 64'hfeedface_cafef00d; seed_we = 1;
    @(posedge clk); #1;
    seed_we = 0;
    checks++;
    if (q !== seed) failures++;
    model = seed;
    run(100);
    seed = '0; seed_we = 1;
    @(posedge clk); #1;
    seed_we = 0;
    checks++;
    if (q !== SEED) failures++;
    model = SEED;
    run(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
