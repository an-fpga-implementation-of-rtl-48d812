// tb_cf_map: checks that the composite field transformation is a field
// isomorphism: it is linear, bijective, maps 1 to 1 and turns GF(2^8)
// products into GF((2^4)^2) products (all 65536 pairs), and equals the map
// x -> {5,9} built from powers.
module tb_cf_map;
  import aes_ref_pkg::*;
  logic [7:0] a, b, ta, tb_, tab;
  logic [255:0] seen;
  int checks = 0, failures = 0;

  cf_map u_a  (.a(a), .b(ta));
  cf_map u_b  (.a(b), .b(tb_));
  cf_map u_ab (.a(r_mul8(a, b)), .b(tab));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 256; i++) begin
      a = 8'(i); b = 8'h01; #1;
      seen[ta] = 1'b1;
      checks++;
      if (ta !== r_map(a)) begin
        failures++;
        $display("FAIL T(%h) = %h, expected %h", a, ta, r_map(a));
      end
    end
    checks++;
    if (seen !== '1) begin failures++; $display("FAIL T is not bijective"); end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        checks++;
        if (tab !== r_cmul(ta, tb_)) begin
          failures++;
          if (failures < 10) $display("FAIL T(%h*%h) = %h, T(a)*T(b) = %h", a, b, tab, r_cmul(ta, tb_));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
