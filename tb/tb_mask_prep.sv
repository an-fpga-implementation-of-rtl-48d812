// tb_mask_prep: all masks m with random nibbles (including 0) for Y,
// compared with the operand definitions: {X1,X0} = T*m, X1+X0, X1^2*w^14,
// Y (1 when the nibble is 0), Y^2, Y^-1 and the output mask A_lin*m.
module tb_mask_prep;
  import aes_ref_pkg::*;
  logic [7:0] m, mout;
  logic [3:0] yraw, x1, x0, x1px0, x1sqw, y, y2, yinv;
  int checks = 0, failures = 0;

  mask_prep dut (.m, .yraw, .x1, .x0, .x1px0, .x1sqw, .y, .y2, .yinv, .mout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t;
    logic [3:0] ye;
    for (int i = 0; i < 256; i++) begin
      m = 8'(i);
      yraw = (i < 16) ? 4'(i) : 4'($urandom);
      #1;
      t  = r_map(m);
      ye = (yraw == 4'h0) ? 4'h1 : yraw;
      checks++;
      if ({x1, x0} !== t || x1px0 !== (t[7:4] ^ t[3:0]) ||
          x1sqw !== r_mul4(r_mul4(t[7:4], t[7:4]), 4'h9) ||
          y !== ye || y2 !== r_mul4(ye, ye) || r_mul4(yinv, ye) !== 4'h1 ||
          mout !== (r_affine(m) ^ 8'h63)) begin
        failures++;
        $display("FAIL m=%h yraw=%h", m, yraw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
