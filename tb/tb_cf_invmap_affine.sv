// tb_cf_invmap_affine: for every byte a, the block applied to the
// composite-field image of a (built independently from powers of {5,9})
// must give the FIPS-197 affine transformation of a.
module tb_cf_invmap_affine;
  import aes_ref_pkg::*;
  logic [7:0] b, s;
  int checks = 0, failures = 0;

  cf_invmap_affine dut (.b, .s);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      b = r_map(8'(i)); #1;
      checks++;
      if (s !== r_affine(8'(i))) begin
        failures++;
        $display("FAIL a=%h: %h, expected %h", i, s, r_affine(8'(i)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
