// tb_gf4_sq: exhaustive check of the GF(2^4) squarer against a*a.
module tb_gf4_sq;
  import aes_ref_pkg::*;
  logic [3:0] a, s;
  int checks = 0, failures = 0;

  gf4_sq dut (.a, .s);

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
      if (s !== r_mul4(a, a)) begin
        failures++;
        $display("FAIL %h^2 = %h, expected %h", a, s, r_mul4(a, a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
