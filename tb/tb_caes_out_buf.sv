// tb_caes_out_buf: the ping-pong output buffers.  Two blocks are written,
// free_cnt must count down to 0 and back; with OE high the words come out
// most significant first with RDONE, block by block in write order; with OE
// low nothing is read.  A write into the free buffer while the other one is
// being read must not disturb the read.
module tb_caes_out_buf;
  import caes_pkg::*;

  logic clk = 0, rst = 1, wr = 0, oe = 0;
  block_t wdata = 0;
  logic rdone;
  word_t rdata;
  logic [1:0] free_cnt;
  int checks = 0, failures = 0;

  caes_out_buf dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s", what); end
  endtask

  task automatic put(block_t b);
    @(negedge clk); wr = 1; wdata = b; @(negedge clk); wr = 0;
  endtask

  task automatic get(block_t b, bit write_mid = 0, block_t nb = '0);
    @(negedge clk);
    oe = 1;
    for (int k = 0; k < 4; k++) begin
      #1;
      chk(rdone === 1'b1, "rdone low while data available");
      chk(rdata === b[127 - 32*k -: 32], $sformatf("word %0d: %h", k, rdata));
      if (write_mid && k == 1) begin wr = 1; wdata = nb; end
      @(negedge clk);
      wr = 0;
    end
    oe = 0;
  endtask

  initial begin
    block_t a, b, c;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 20; t++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      c = {$urandom, $urandom, $urandom, $urandom};
      chk(free_cnt == 2, "not empty at start");
      oe = 1; #1; chk(rdone === 1'b0, "rdone while empty"); oe = 0;
      put(a);
      chk(free_cnt == 1, "free_cnt after one write");
      put(b);
      chk(free_cnt == 0, "free_cnt after two writes");
      repeat (3) @(negedge clk);
      chk(rdone === 1'b0, "read with oe low");
      get(a);
      chk(free_cnt == 1, "free_cnt after one read");
      get(b, 1, c);
      get(c);
      chk(free_cnt == 2, "free_cnt after all reads");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
