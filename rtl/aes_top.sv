// aes_top: AES-128 encryption coprocessor, masked against first-order
// power analysis by default.
//
// Input registers hold plaintext and key (written with load); start begins
// an encryption, which reads them in its first cycle, so they may be
// reloaded while it runs. The core needs fresh random bits every cycle: two
// 64-bit generators supply 128 bits. 93 cycles after start was sampled the
// ciphertext is in ct_out and done pulses for one cycle. busy is high from
// the cycle after start until done. rst (synchronous) aborts an encryption.
// seed_we/seed reseed the generators.
// MASKED = 0 builds the unsecured variant, same timing.
module aes_top
  import aes_pkg::*;
#(
  parameter bit MASKED = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  block_t pt_in,
  input  block_t key_in,
  input  logic   start,
  input  logic   seed_we,
  input  block_t seed,
  output block_t ct_out,
  output logic   done,
  output logic   busy
);
  block_t pt_r, key_r, ct, rnd;
  logic   ct_we;

  prng #(.SEED(64'h9E3779B97F4A7C15)) u_rng_hi (
    .clk, .rst, .seed_we, .seed(seed[127:64]), .q(rnd[127:64]));
  prng #(.SEED(64'hD1B54A32D192ED03)) u_rng_lo (
    .clk, .rst, .seed_we, .seed(seed[63:0]),   .q(rnd[63:0]));

  aes_core #(.MASKED(MASKED)) u_core (
    .clk, .rst, .start, .pt(pt_r), .key(key_r), .rnd, .ct, .ct_we, .busy);

  always_ff @(posedge clk) begin
    if (rst) begin
      pt_r   <= '0;
      key_r  <= '0;
      ct_out <= '0;
      done   <= 1'b0;
    end else begin
      if (load) begin
        pt_r  <= pt_in;
        key_r <= key_in;
      end
      if (ct_we) ct_out <= ct;
      done <= ct_we;
    end
  end
endmodule
