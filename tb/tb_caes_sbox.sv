// tb_caes_sbox: the configurable S-box over all 256 inputs, for the standard
// AES parameters (with FIPS-197 table values as spot checks) and for random
// configurations, against the reference y = A*x^-1 + c_A in the m(x) basis.
module tb_caes_sbox;
  import caes_ref_pkg::*;
  logic [63:0] d, adi;
  logic [7:0] ca, x, y;
  int checks = 0, failures = 0;

  caes_sbox dut (.d, .adi, .ca, .x, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t c;
    for (int t = 0; t < 4; t++) begin
      c = (t == 0) ? std_cfg() : rand_cfg();
      d = c.d; adi = mm(c.a, c.di); ca = c.ca;
      for (int i = 0; i < 256; i++) begin
        x = 8'(i);
        #1;
        checks++;
        if (y !== sbox(c, x)) begin failures++; $display("cfg %0d S(%h)=%h exp %h", t, x, y, sbox(c, x)); end
        if (t == 0 && (i == 0 || i == 8'h01 || i == 8'h53 || i == 8'hff)) begin
          logic [7:0] k;
          k = (i == 0) ? 8'h63 : (i == 1) ? 8'h7c : (i == 8'h53) ? 8'hed : 8'h16;
          checks++;
          if (y !== k) begin failures++; $display("FIPS S(%h)=%h exp %h", x, y, k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
