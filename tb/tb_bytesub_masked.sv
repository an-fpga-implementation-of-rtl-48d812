// tb_bytesub_masked: for every byte A and 16 random (X, Y) pairs each,
// drives the masked S-box with A ^ X and mask operands computed here from
// their definitions, and expects S(A) ^ A_lin*X, where A_lin*X is the
// affine map of X without its constant. Y runs over non-zero values only.
module tb_bytesub_masked;
  import aes_ref_pkg::*;
  logic [7:0] din, dout, xt, x;
  logic [3:0] x1, x0, x1px0, x1sqw, y, y2, yinv;
  int checks = 0, failures = 0;

  bytesub_masked dut (.din, .x1, .x0, .x1px0, .x1sqw, .y, .y2, .yinv, .dout);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int a = 0; a < 256; a++)
      for (int k = 0; k < 16; k++) begin
        x  = (k == 0) ? 8'h00 : 8'($urandom);
        y  = 4'(1 + $urandom_range(14));
        xt = r_map(x);
        {x1, x0} = xt;
        x1px0 = x1 ^ x0;
        x1sqw = r_mul4(r_mul4(x1, x1), 4'h9);
        y2    = r_mul4(y, y);
        yinv  = r_inv4(y);
        din   = 8'(a) ^ x;
        #1;
        e = r_sbox(8'(a)) ^ r_affine(x) ^ 8'h63;
        checks++;
        if (dout !== e) begin
          failures++;
          if (failures < 10) $display("FAIL A=%h X=%h Y=%h: %h, expected %h", a, x, y, dout, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
