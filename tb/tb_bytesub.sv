// tb_bytesub: exhaustive check of the composite-field S-box against the
// S-box computed from its definition (GF(2^8) inverse + affine map), plus
// three FIPS-197 table entries.
module tb_bytesub;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  bytesub dut (.din, .dout);

  task automatic chk(input logic [7:0] a, input logic [7:0] e);
    din = a; #1;
    checks++;
    if (dout !== e) begin
      failures++;
      $display("FAIL S(%h) = %h, expected %h", a, dout, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(8'h00, 8'h63);
    chk(8'h53, 8'hed);
    chk(8'hff, 8'h16);
    for (int i = 0; i < 256; i++) chk(8'(i), r_sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
