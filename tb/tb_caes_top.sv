// tb_caes_top: end-to-end test of the C-AES coprocessor at its default
// configuration, through its pins only (plus a probe of the engine's output
// strobe to measure the block period).
//
// A host process writes parameter, key, IV and text words with READY and
// honours Wait Buffer; a reader process collects RDATA words while OE is
// allowed.  Results are compared with an independent software model
// (caes_ref_pkg).  Sessions cover the FIPS-197 vectors for 128/192/256-bit
// keys in both directions, random configurations (m(x), affine matrix and
// constant, MixColumns row), CBC chaining, key changes, output back-pressure
// and back-to-back blocks, whose period must be Nr cycles (10/12/14, i.e.
// 3.2/2.67/2.29 Gbit/s at 250 MHz) for every key length, and Nr+1 in CBC
// encryption.  Each mechanism is counted and must occur at least once.
module tb_caes_top;
  import caes_ref_pkg::*;

  logic clk = 0, reset = 1;
  logic key_change = 0, cbc = 0, ende = 0, ready = 0, oe = 0;
  logic [1:0] key_length = 0;
  logic [31:0] wdata = 0, rdata;
  logic rdone, wait_buffer, working;

  int checks = 0, failures = 0;
  int n_init = 0, n_keychg = 0, n_cbc = 0, n_dec = 0, n_enc = 0;
  int n_kl[3] = '{0, 0, 0};
  int n_b2b = 0, n_wait = 0, n_outfull = 0, n_rand = 0;
  int n_b2b_kl[3] = '{0, 0, 0};  // results Nr cycles apart, per key length
  int n_cbce = 0;                // CBC-encryption results Nr+1 cycles apart

  caes_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reader ----------------
  u128 rx_q [$];
  logic [127:0] rx_acc;
  int rx_n = 0;
  bit oe_en = 1;
  always @(negedge clk) oe <= oe_en;
  always @(posedge clk) begin
    if (rdone) begin
      rx_acc = {rx_acc[95:0], rdata};
      rx_n++;
      if (rx_n == 4) begin rx_q.push_back(rx_acc); rx_n = 0; end
    end
  end

  // ---------------- block period probe ----------------
  int last_wr = -100, cyc = 0, exp_period = 10, cur_kl = 0;
  bit cur_cbce = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.out_wr) begin
      if (cyc - last_wr == exp_period) begin n_b2b++; n_b2b_kl[cur_kl]++; end
      if (cur_cbce && cyc - last_wr == exp_period + 1) n_cbce++;
      if (cur_cbce && cyc - last_wr == exp_period) begin
        failures++;
        $display("CBC encryption block started before its chain value existed");
      end
      if (cyc - last_wr < exp_period) begin
        failures++;
        $display("block period %0d below Nr=%0d", cyc - last_wr, exp_period);
      end
      last_wr = cyc;
    end
    if (dut.u_io.text_valid && !dut.working && dut.out_free == 0) n_outfull++;
  end

  task automatic write_word(u32 w);
    @(negedge clk);
    while (wait_buffer) begin n_wait++; @(negedge clk); end
    ready = 1; wdata = w;
    @(negedge clk);
    ready = 0;
  endtask

  function automatic u128 expect_blk(cfg_t c, bit dec, bit cb, logic [255:0] key, int kl,
                                     u128 din, ref u128 chain);
    u128 r;
    if (!dec) begin
      r = encrypt(c, key, kl, din ^ (cb ? chain : 128'h0));
      chain = r;
    end else begin
      r = decrypt(c, key, kl, din) ^ (cb ? chain : 128'h0);
      chain = din;
    end
    return r;
  endfunction

  // One session: optional reset+init or key change, then nblk text blocks.
  task automatic session(cfg_t c, bit dec, bit cb, int kl, logic [255:0] key, u128 iv,
                         u128 txt [], bit do_init, bit do_kc, u128 exp_fixed [] = '{});
    u128 chain = iv;
    u128 expq [$];
    int nk = nk_of(kl);
    exp_period = nr_of(kl);
    cur_kl = kl;
    cur_cbce = cb && !dec;
    // Let the previous session drain.
    while (working || rx_q.size() > 0 || dut.u_io.text_valid) @(negedge clk);
    if (do_init) begin
      @(negedge clk); reset = 1; @(negedge clk); reset = 0;
      n_init++;
    end
    ende = dec; cbc = cb; key_length = 2'(kl);
    if (do_kc) begin key_change = 1; n_keychg++; end
    if (do_init) for (int i = 0; i < 10; i++) write_word(param_word(c, dec, i));
    if (do_init || do_kc) begin
      for (int k = 0; k < nk; k++) begin
        write_word(key[255 - 32*k -: 32]);
        key_change = 0;
      end
      if (cb) for (int k = 0; k < 4; k++) write_word(iv[127 - 32*k -: 32]);
    end
    foreach (txt[b]) begin
      expq.push_back(expect_blk(c, dec, cb, key, kl, txt[b], chain));
      for (int k = 0; k < 4; k++) write_word(txt[b][127 - 32*k -: 32]);
    end
    foreach (expq[b]) begin
      u128 got;
      int guard = 0;
      while (rx_q.size() == 0 && guard < 2000) begin @(posedge clk); guard++; end
      checks++;
      if (rx_q.size() == 0) begin
        failures++; $display("no output for block %0d", b);
      end else begin
        got = rx_q.pop_front();
        if (got !== expq[b]) begin
          failures++;
          $display("block %0d dec=%0d cbc=%0d kl=%0d: got %h exp %h", b, dec, cb, kl, got, expq[b]);
        end
        if (b < exp_fixed.size()) begin
          checks++;
          if (got !== exp_fixed[b]) begin
            failures++; $display("known-answer mismatch: got %h exp %h", got, exp_fixed[b]);
          end
        end
      end
    end
    if (dec) n_dec++; else n_enc++;
    if (cb) n_cbc++;
    n_kl[kl]++;
  endtask

  initial begin
    cfg_t sc, rc;
    logic [255:0] k128, k192, k256, kr;
    u128 pt, ivr;
    u128 blks [];
    sc = std_cfg();
    k128 = {128'h000102030405060708090a0b0c0d0e0f, 128'h0};
    k192 = {192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0};
    k256 = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    pt   = 128'h00112233445566778899aabbccddeeff;
    repeat (3) @(negedge clk);
    reset = 0;

    // FIPS-197 known answers, encryption, three key lengths.
    session(sc, 0, 0, 0, k128, '0, '{pt}, 1, 0, '{128'h69c4e0d86a7b0430d8cdb78070b4c55a});
    session(sc, 0, 0, 1, k192, '0, '{pt}, 0, 1, '{128'hdda97ca4864cdfe06eaf70a0ec0d7191});
    session(sc, 0, 0, 2, k256, '0, '{pt}, 0, 1, '{128'h8ea2b7ca516745bfeafc49904b496089});
    // Decryption of the same vectors.
    session(sc, 1, 0, 0, k128, '0, '{128'h69c4e0d86a7b0430d8cdb78070b4c55a}, 1, 0, '{pt});
    session(sc, 1, 0, 1, k192, '0, '{128'hdda97ca4864cdfe06eaf70a0ec0d7191}, 0, 1, '{pt});
    session(sc, 1, 0, 2, k256, '0, '{128'h8ea2b7ca516745bfeafc49904b496089}, 0, 1, '{pt});

    // Streams of blocks: back-to-back period, ECB and CBC, all key lengths.
    for (int kl = 0; kl < 3; kl++) begin
      blks = new[6];
      foreach (blks[i]) blks[i] = {$urandom, $urandom, $urandom, $urandom};
      kr  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ivr = {$urandom, $urandom, $urandom, $urandom};
      session(sc, 0, 1, kl, kr, ivr, blks, 1, 0);
      session(sc, 0, 0, kl, kr, ivr, blks, 0, 1);
    end

    // Random configurations, both directions, CBC and ECB.
    for (int t = 0; t < 3; t++) begin
      rc = rand_cfg();
      n_rand++;
      for (int kl = 0; kl < 3; kl++) begin
        blks = new[3];
        foreach (blks[i]) blks[i] = {$urandom, $urandom, $urandom, $urandom};
        kr  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        ivr = {$urandom, $urandom, $urandom, $urandom};
        session(rc, 0, kl[0], kl, kr, ivr, blks, 1, 0);
        session(rc, 1, kl[0], kl, kr, ivr, blks, 1, 0);
        session(rc, 1, !kl[0], kl, kr, ivr, blks, 0, 1);
      end
    end

    // Output back-pressure: reader stops, buffers fill, engine and input stall.
    blks = new[5];
    foreach (blks[i]) blks[i] = {$urandom, $urandom, $urandom, $urandom};
    oe_en = 0;
    fork
      session(sc, 0, 0, 0, k128, '0, blks, 1, 0);
      begin repeat (200) @(posedge clk); oe_en = 1; end
    join

    // Every mechanism must have happened.
    checks++; if (n_init == 0)    begin failures++; $display("no initialization"); end
    checks++; if (n_keychg == 0)  begin failures++; $display("no key change"); end
    checks++; if (n_cbc == 0)     begin failures++; $display("no CBC"); end
    checks++; if (n_dec == 0)     begin failures++; $display("no decryption"); end
    checks++; if (n_enc == 0)     begin failures++; $display("no encryption"); end
    for (int k = 0; k < 3; k++) begin
      checks++; if (n_kl[k] == 0) begin failures++; $display("key length %0d unused", k); end
    end
    checks++; if (n_b2b == 0)     begin failures++; $display("no back-to-back block"); end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_b2b_kl[k] == 0) begin failures++; $display("key length %0d: never Nr cycles per block", k); end
    end
    checks++; if (n_cbce == 0)    begin failures++; $display("CBC encryption never at Nr+1 cycles"); end
    checks++; if (n_wait == 0)    begin failures++; $display("Wait Buffer never seen"); end
    checks++; if (n_outfull == 0) begin failures++; $display("output buffers never full"); end
    checks++; if (n_rand == 0)    begin failures++; $display("no random configuration"); end
    $display("init=%0d keychange=%0d cbc=%0d enc=%0d dec=%0d kl=%0d/%0d/%0d b2b=%0d (%0d/%0d/%0d) cbc_enc_nr+1=%0d wait=%0d outfull=%0d rand=%0d",
             n_init, n_keychg, n_cbc, n_enc, n_dec, n_kl[0], n_kl[1], n_kl[2], n_b2b,
             n_b2b_kl[0], n_b2b_kl[1], n_b2b_kl[2], n_cbce, n_wait, n_outfull, n_rand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
