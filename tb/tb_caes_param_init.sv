// tb_caes_param_init: the parameter initialization engine.  The ten words
// of a standard or random configuration are written with random gaps, for
// encryption and decryption; every merged matrix must equal the product the
// testbench forms itself, and 'ready' must rise exactly eight clock cycles
// after the tenth word (steps 11..18 of the schedule) and not earlier.
module tb_caes_param_init;
  import caes_pkg::*;
  import caes_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic ende = 0, pw_valid = 0;
  logic [3:0] pw_idx = 0;
  word_t pw_data = 0;
  caes_params_t prm;
  logic ready;
  int checks = 0, failures = 0;

  caes_param_init dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [63:0] got, logic [63:0] expv, string what);
    checks++;
    if (got !== expv) begin failures++; $display("%s: got %h exp %h", what, got, expv); end
  endtask

  task automatic run(cfg_t c, bit dec);
    int lat;
    m64 dai, adi;
    @(negedge clk);
    ende = dec;
    for (int i = 0; i < 10; i++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      pw_valid = 1; pw_idx = 4'(i); pw_data = param_word(c, dec, i);
      @(negedge clk);
      pw_valid = 0;
      if (i == 0) begin checks++; if (ready) begin failures++; $display("ready during load"); end end
    end
    lat = 0;  // clock edges after the edge that took word 10
    while (!ready && lat < 40) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 8) begin failures++; $display("ready %0d cycles after last word, expected 8", lat); end
    dai = mm(c.d, c.ai);
    adi = mm(c.a, c.di);
    chk(prm.d, c.d, "delta'");
    chk(prm.di, c.di, "delta'^-1");
    chk(prm.adi, adi, "A delta'^-1");
    chk(prm.dai, dai, "delta' A^-1");
    chk(64'(prm.m), 64'(c.m), "m");
    chk(64'(prm.ca), 64'(c.ca), "cA");
    chk(64'(prm.cap), 64'(mv(dai, c.ca)), "c'A");
    for (int k = 0; k < 4; k++)
      chk(prm.mc[k], dec ? mm(mm(dai, cmat(c.drow[31 - 8*k -: 8], c.m)), c.di)
                         : mm(mm(c.d, cmat(c.crow[31 - 8*k -: 8], c.m)), adi),
          $sformatf("MC'%0d dec=%0d", k, dec));
  endtask

  initial begin
    cfg_t c;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      c = (t == 0) ? std_cfg() : rand_cfg();
      run(c, 0);
      run(c, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
