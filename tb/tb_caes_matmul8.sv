// tb_caes_matmul8: random test of the 8-bit GF(2) matrix multiplier against
// a bit-by-bit reference (output bit i = XOR_j M[i][j] & x[j]), plus the
// identity and the multiply-by-constant use (columns xtime^i(c)).
module tb_caes_matmul8;
  import caes_ref_pkg::*;
  logic [63:0] m;
  logic [7:0] x, y;
  int checks = 0, failures = 0;

  caes_matmul8 dut (.m, .x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      m = {$urandom, $urandom};
      x = 8'($urandom);
      if (t < 256) begin m = 64'h8040201008040201; x = 8'(t); end
      else if (t < 512) begin m = cmat(8'h03, 8'h1B); end
      #1;
      checks++;
      if (y !== mv(m, x)) begin failures++; $display("M=%h x=%h y=%h", m, x, y); end
      if (t >= 256 && t < 512) begin
        checks++;
        if (y !== gmul(8'h03, x, 8'h1B)) begin failures++; $display("3*%h = %h", x, y); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
