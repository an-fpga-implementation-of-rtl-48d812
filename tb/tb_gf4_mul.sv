// tb_gf4_mul: exhaustive check of the GF(2^4) multiplier (256 operand
// pairs) against a shift-and-add product reduced by y^4 + y + 1.
module tb_gf4_mul;
  import aes_ref_pkg::*;
  logic [3:0] a, b, p;
  int checks = 0, failures = 0;

  gf4_mul dut (.a, .b, .p);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j); #1;
        checks++;
        if (p !== r_mul4(a, b)) begin
          failures++;
          $display("FAIL %h*%h = %h, expected %h", a, b, p, r_mul4(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
