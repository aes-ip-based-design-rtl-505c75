// tb_caes_cipher_engine: the round datapath alone.  The testbench prepares
// the merged parameter set itself (delta', A*delta'^-1, delta'*A^-1, the
// MixColumns' matrices and c'_A) from a configuration, feeds the round keys
// of the reference key schedule, and checks that after a load and Nr-1
// steps the output equals the reference encryption or decryption, i.e. the
// latency is Nr cycles.  Standard AES (with the FIPS-197 vector) and random
// configurations, all three key lengths.
module tb_caes_cipher_engine;
  import caes_pkg::*;
  import caes_ref_pkg::*;

  logic clk = 0, rst = 1;
  caes_params_t prm;
  logic ende = 0, load = 0, step = 0;
  block_t din, ik, rk, dout;
  int checks = 0, failures = 0;

  caes_cipher_engine dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic caes_params_t mk(cfg_t c, bit dec);
    caes_params_t p;
    p.d   = c.d;
    p.di  = c.di;
    p.adi = mm(c.a, c.di);
    p.dai = mm(c.d, c.ai);
    for (int k = 0; k < 4; k++)
      p.mc[k] = dec ? mm(mm(p.dai, cmat(c.drow[31 - 8*k -: 8], c.m)), c.di)
                    : mm(mm(c.d, cmat(c.crow[31 - 8*k -: 8], c.m)), p.adi);
    p.m   = c.m;
    p.ca  = c.ca;
    p.cap = mv(p.dai, c.ca);
    return p;
  endfunction

  task automatic run(cfg_t c, bit dec, int kl, logic [255:0] key, u128 x, u128 exp_fixed = '0, bit has_fixed = 0);
    int nr = caes_ref_pkg::nr_of(kl);
    u128 expv = dec ? decrypt(c, key, kl, x) : encrypt(c, key, kl, x);
    @(negedge clk);
    prm = mk(c, dec); ende = dec; din = x;
    ik  = round_key(c, key, kl, dec ? nr : 0);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int r = 1; r <= nr; r++) begin
      rk = round_key(c, key, kl, dec ? nr - r : r);
      if (r < nr) begin
        step = 1; @(negedge clk); step = 0;
      end
    end
    #1;
    checks++;
    if (dout !== expv) begin failures++; $display("dec=%0d kl=%0d got %h exp %h", dec, kl, dout, expv); end
    if (has_fixed) begin
      checks++;
      if (dout !== exp_fixed) begin failures++; $display("FIPS mismatch %h", dout); end
    end
  endtask

  initial begin
    cfg_t c;
    logic [255:0] key;
    u128 pt = 128'h00112233445566778899aabbccddeeff;
    repeat (2) @(negedge clk);
    rst = 0;
    c = std_cfg();
    run(c, 0, 0, {128'h000102030405060708090a0b0c0d0e0f, 128'h0}, pt, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    run(c, 1, 2, 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h8ea2b7ca516745bfeafc49904b496089, pt, 1);
    for (int t = 0; t < 4; t++) begin
      c = (t == 0) ? std_cfg() : rand_cfg();
      for (int kl = 0; kl < 3; kl++)
        for (int dec = 0; dec < 2; dec++) begin
          key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
          run(c, dec[0], kl, key, {$urandom, $urandom, $urandom, $urandom});
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
