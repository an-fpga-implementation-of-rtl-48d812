// tb_gf4_mul_w14: exhaustive check of the multiplication by w^14 = 4'h9,
// and that w^14 is indeed the 14th power of w = 4'h2.
module tb_gf4_mul_w14;
  import aes_ref_pkg::*;
  logic [3:0] a, p, w14;
  int checks = 0, failures = 0;

  gf4_mul_w14 dut (.a, .p);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w14 = 4'h1;
    for (int k = 0; k < 14; k++) w14 = r_mul4(w14, 4'h2);
    checks++;
    if (w14 !== 4'h9) begin failures++; $display("FAIL w^14 = %h", w14); end
    for (int i = 0; i < 16; i++) begin
      a = 4'(i); #1;
      checks++;
      if (p !== r_mul4(a, w14)) begin
        failures++;
        $display("FAIL %h*w14 = %h, expected %h", a, p, r_mul4(a, w14));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
