// tb_gf4_inv: exhaustive check of the GF(2^4) inversion table: a * r = 1
// for every non-zero a, and 0 -> 0.
module tb_gf4_inv;
  import aes_ref_pkg::*;
  logic [3:0] a, r;
  int checks = 0, failures = 0;

  gf4_inv dut (.a, .r);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i); #1;
      checks++;
      if ((i == 0 && r !== 4'h0) || (i != 0 && r_mul4(a, r) !== 4'h1)) begin
        failures++;
        $display("FAIL inv(%h) = %h", a, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
