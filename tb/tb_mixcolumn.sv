// tb_mixcolumn: the FIPS-197 example column db135345 -> 8e4da1bc and 1000
// random columns against the matrix product with 02/03/01/01.
module tb_mixcolumn;
  import aes_ref_pkg::*;
  logic [31:0] col, out;
  int checks = 0, failures = 0;

  mixcolumn dut (.col, .out);

  task automatic chk(input logic [31:0] c, input logic [31:0] e);
    col = c; #1;
    checks++;
    if (out !== e) begin
      failures++;
      $display("FAIL MixColumn(%h) = %h, expected %h", c, out, e);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk(32'hdb135345, 32'h8e4da1bc);
    chk(32'hf20a225c, 32'h9fdc589d);
    chk(32'h01010101, 32'h01010101);
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] c = $urandom;
      chk(c, r_mix_col(c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
