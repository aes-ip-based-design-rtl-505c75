// tb_caes_gf_inv: exhaustive test of the GF((2^4)^2) inverter.  For every
// nonzero byte a the product a*inv(a), computed with the reference
// composite-field multiplier, must be 1; zero must map to zero.
module tb_caes_gf_inv;
  import caes_ref_pkg::*;
  logic [7:0] a, y;
  int checks = 0, failures = 0;

  caes_gf_inv dut (.a, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (i == 0 ? (y !== 8'h00) : (cmul(a, y) !== 8'h01)) begin
        failures++;
        $display("inv(%h) = %h wrong", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
