// tb_caes_io_if: the input interface.  After reset the first sequence must
// be parameters (10 words, forwarded with their index), key (4/6/8 words),
// IV when CBC is selected, then text; later sequences carry text only, or
// key (+IV) then text when Key Change is high.  The text block must be held
// with Wait Buffer high until taken, a key sequence must wait while the
// engine is busy, and the cycle counts of the transfer schedule (18/20/22/26
// words for initialization, 4 for text only, 8/10/12/16 for a key change)
// are checked.
module tb_caes_io_if;
  import caes_pkg::*;

  logic clk = 0, rst = 1;
  logic ready = 0, key_change = 0, cbc_in = 0, ende_in = 0, engine_busy = 0, take = 0;
  keylen_e keylen_in = KL128;
  word_t wdata = 0;
  logic wait_buffer, cbc, ende, pw_valid, key_start, key_loaded, iv_loaded, text_valid;
  keylen_e keylen;
  logic [3:0] pw_idx;
  word_t pw_data;
  logic [255:0] key;
  block_t iv, text;
  int checks = 0, failures = 0;
  int n_pw = 0, pw_err = 0, n_ks = 0, n_kl = 0, n_iv = 0;

  caes_io_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (pw_valid) begin
      if (pw_idx != 4'(n_pw) || pw_data != 32'hA000_0000 + n_pw) pw_err++;
      n_pw++;
    end
    if (key_start) n_ks++;
    if (key_loaded) n_kl++;
    if (iv_loaded) n_iv++;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s", what); end
  endtask

  // Write one word; returns the number of cycles spent waiting.
  task automatic wr(word_t w, output int waited);
    waited = 0;
    @(negedge clk);
    while (wait_buffer) begin waited++; @(negedge clk); end
    ready = 1; wdata = w;
    @(negedge clk);
    ready = 0;
  endtask

  task automatic seq(bit init, bit kc, bit cb, int kl, int exp_words);
    int nk = kl == 1 ? 6 : kl == 2 ? 8 : 4;
    int words = 0, w8;
    logic [255:0] k;
    block_t v, t;
    k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    v = {$urandom, $urandom, $urandom, $urandom};
    t = {$urandom, $urandom, $urandom, $urandom};
    cbc_in = cb; keylen_in = keylen_e'(kl); key_change = kc;
    n_pw = 0; n_ks = 0; n_kl = 0; n_iv = 0;
    if (init) for (int i = 0; i < 10; i++) begin wr(32'hA000_0000 + i, w8); words++; end
    if (init || kc) begin
      for (int i = 0; i < nk; i++) begin wr(k[255 - 32*i -: 32], w8); words++; key_change = 0; end
      if (cb) for (int i = 0; i < 4; i++) begin wr(v[127 - 32*i -: 32], w8); words++; end
    end
    for (int i = 0; i < 4; i++) begin wr(t[127 - 32*i -: 32], w8); words++; end
    chk(words == exp_words, $sformatf("sequence of %0d words, expected %0d", words, exp_words));
    chk(text_valid && text === t, "text block");
    chk(wait_buffer, "wait_buffer low with block pending");
    chk(n_pw == (init ? 10 : 0) && pw_err == 0, $sformatf("parameter words %0d err %0d", n_pw, pw_err));
    if (init || kc) begin
      chk(n_ks == 1 && n_kl == 1, "key start/loaded strobes");
      chk(key[255 -: 128] === k[255 -: 128] && (nk < 6 || key[127 -: 64] === k[127 -: 64]) &&
          (nk < 8 || key[63:0] === k[63:0]), "key register");
      chk(cbc == cb && keylen == keylen_e'(kl), "latched mode");
      chk(!cb || (n_iv == 1 && iv === v), "IV register");
    end
    // Host is held off while the block waits; then the engine takes it.
    repeat (3) @(negedge clk);
    chk(wait_buffer && text_valid, "block released early");
    take = 1; @(negedge clk); take = 0;
    chk(!text_valid && !wait_buffer, "block not released by take");
  endtask

  initial begin
    int w8;
    repeat (2) @(negedge clk);
    rst = 0;
    seq(1, 0, 0, 0, 18);
    seq(0, 0, 0, 0, 4);
    seq(0, 1, 0, 1, 10);
    seq(0, 1, 0, 2, 12);
    seq(0, 1, 0, 0, 8);
    seq(0, 1, 1, 2, 16);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    seq(1, 0, 0, 1, 20);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    seq(1, 0, 0, 2, 22);
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    seq(1, 0, 1, 2, 26);
    // Key change must wait while the engine is busy.
    engine_busy = 1; key_change = 1;
    repeat (2) @(negedge clk);
    chk(wait_buffer, "key change accepted while engine busy");
    fork
      wr(32'h1234_5678, w8);
      begin repeat (5) @(negedge clk); engine_busy = 0; end
    join
    chk(w8 >= 4, $sformatf("waited only %0d cycles", w8));
    chk(key[255:224] == 32'h1234_5678, "first key word after the wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
