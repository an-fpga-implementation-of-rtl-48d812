// prng: random number source for the masks, a 64-bit xorshift generator
// (x ^= x << 13; x ^= x >> 7; x ^= x << 17) that steps every clock cycle,
// so q is a new 64-bit word each cycle. The paper only asks for a random
// number generator; this is the simplest one giving a full word per cycle.
// It is not a cryptographically strong source: a real product would feed
// the masks from a true random number generator.
//
// Synchronous reset loads SEED; seed_we loads seed. An all-zero state would
// lock the generator, so a zero seed is replaced by SEED.
module prng #(
  parameter logic [63:0] SEED = 64'h9E3779B97F4A7C15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        seed_we,
  input  logic [63:0] seed,
  output logic [63:0] q
);
  logic [63:0] s1, s2, s3;

  always_comb begin
    s1 = q  ^ (q  << 13);
    s2 = s1 ^ (s1 >> 7);
    s3 = s2 ^ (s2 << 17);
  end

  always_ff @(posedge clk) begin
    if (rst)
      q <= SEED;
    else if (seed_we)
      q <= (seed == 64'h0) ? SEED : seed;
    else
      q <= s3;
  end
endmodule
