// tb_caes_keygen: the 3-in-1 key generator alone, for 128/192/256-bit keys
// with the standard and random S-box configurations.  Forward: after
// load_init (s=0) and steps s=1..Nr-1 the output must be K(1)..K(Nr), one
// per cycle; the window is then captured as the final key, whose first round
// key must be K(Nr).  Backward: load_final (s=Nr-1) and steps s=Nr-2..0 must
// give K(Nr-1)..K(0).  References come from the software key schedule.
module tb_caes_keygen;
  import caes_pkg::*;
  import caes_ref_pkg::*;

  logic clk = 0, rst = 1;
  keylen_e keylen;
  caes_params_t prm;
  logic [255:0] init_key;
  logic load_init = 0, load_final = 0, step = 0, dir = 0, cap_final = 0;
  logic [3:0] s = 0;
  block_t rk, final_rk;
  int checks = 0, failures = 0;

  caes_keygen dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(u128 got, u128 expv, string what);
    checks++;
    if (got !== expv) begin failures++; $display("%s: got %h exp %h", what, got, expv); end
  endtask

  task automatic run(cfg_t c, int kl, logic [255:0] key);
    int nr = caes_ref_pkg::nr_of(kl);
    @(negedge clk);
    prm = '0; prm.d = c.d; prm.adi = mm(c.a, c.di); prm.ca = c.ca; prm.m = c.m;
    keylen = keylen_e'(kl); init_key = key;
    dir = 0; s = 0; load_init = 1;
    @(negedge clk); load_init = 0;
    for (int i = 1; i <= nr; i++) begin
      chk(rk, round_key(c, key, kl, i), $sformatf("fwd kl=%0d K%0d", kl, i));
      if (i < nr) begin s = 4'(i); step = 1; @(negedge clk); step = 0; end
    end
    cap_final = 1; @(negedge clk); cap_final = 0;
    chk(final_rk, round_key(c, key, kl, nr), "final key");
    init_key = '0;
    dir = 1; s = 4'(nr - 1); load_final = 1;
    @(negedge clk); load_final = 0;
    for (int i = nr - 1; i >= 0; i--) begin
      chk(rk, round_key(c, key, kl, i), $sformatf("bwd kl=%0d K%0d", kl, i));
      if (i > 0) begin s = 4'(i - 1); step = 1; @(negedge clk); step = 0; end
    end
  endtask

  initial begin
    cfg_t c;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3; t++) begin
      c = (t == 0) ? std_cfg() : rand_cfg();
      run(c, 0, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
      for (int kl = 0; kl < 3; kl++)
        run(c, kl, {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    end
    // FIPS-197 Appendix A.1: last round key of 2b7e1516...
    begin
      u128 k10 = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
      run(std_cfg(), 0, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
      chk(final_rk, k10, "FIPS A.1 K10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
