// tb_caes_main_ctrl: the main controller with a stand-in engine whose
// "cipher" is E(x) = x ^ F for a fixed F (its output is taken from the block
// captured at blk_load).  Checks: a block starts only when text, parameters,
// key and an output slot are all ready; each block issues Nr-1 steps and
// writes its result Nr cycles after the load; blocks follow back-to-back
// (period Nr) when both output slots are free, except in CBC encryption
// (period Nr+1); ECB, CBC encryption and CBC decryption chaining give
// c = E(p ^ c_prev) and p = E(c) ^ c_prev with the chain loaded from the IV.
module tb_caes_main_ctrl;
  import caes_pkg::*;

  logic clk = 0, rst = 1;
  keylen_e keylen = KL128;
  logic ende = 0, cbc = 0, text_valid = 0, iv_loaded = 0, params_ready = 0, key_ready = 0;
  block_t text = 0, iv = 0, eng_dout, eng_din, out_data;
  logic [1:0] out_free = 2;
  logic take, blk_load, blk_step, out_wr, working;
  int checks = 0, failures = 0;
  localparam block_t F = 128'hF00D_0123_4567_89AB_CDEF_FEDC_BA98_7654;

  caes_main_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stand-in engine.
  block_t held;
  always @(posedge clk) if (blk_load) held <= eng_din;
  assign eng_dout = held ^ F;

  // Cycle bookkeeping.
  int cyc = 0, t_load = 0, t_wr = -1000, nsteps = 0, nr = 10, period = 0;
  block_t outs [$];
  always @(posedge clk) begin
    cyc++;
    if (blk_step) nsteps++;
    if (out_wr) begin
      outs.push_back(out_data);
      checks++;
      if (cyc - t_load != nr || nsteps != nr - 1) begin
        failures++;
        $display("latency %0d steps %0d for Nr=%0d", cyc - t_load, nsteps, nr);
      end
      period = cyc - t_wr;
      t_wr = cyc;
    end
    if (blk_load) begin t_load = cyc; nsteps = 0; end
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s", what); end
  endtask

  // Offers nb blocks; each is presented as soon as the previous is taken.
  task automatic stream(int kl, bit dec, bit cb, int nb);
    block_t p [], chain, expv;
    int periods [$];
    p = new[nb];
    foreach (p[i]) p[i] = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    keylen = keylen_e'(kl); ende = dec; cbc = cb; nr = kl == 1 ? 12 : kl == 2 ? 14 : 10;
    iv = {$urandom, $urandom, $urandom, $urandom}; iv_loaded = 1;
    @(negedge clk); iv_loaded = 0;
    outs.delete();
    for (int i = 0; i < nb; i++) begin
      text = p[i]; text_valid = 1;
      @(posedge clk);
      while (!take) @(posedge clk);
      @(negedge clk); text_valid = 0;
      if (i > 1) periods.push_back(period);
    end
    while (working) @(negedge clk);
    @(negedge clk);
    chain = iv;
    chk(outs.size() == nb, $sformatf("%0d outputs for %0d blocks", outs.size(), nb));
    foreach (p[i]) begin
      if (!dec) begin expv = (p[i] ^ (cb ? chain : '0)) ^ F; chain = expv; end
      else begin expv = (p[i] ^ F) ^ (cb ? chain : '0); chain = p[i]; end
      if (i < outs.size()) chk(outs[i] === expv, $sformatf("block %0d dec=%0d cbc=%0d", i, dec, cb));
    end
    foreach (periods[i])
      chk(periods[i] == ((cb && !dec) ? nr + 1 : nr),
          $sformatf("period %0d Nr=%0d cbc=%0d dec=%0d", periods[i], nr, cb, dec));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    // Nothing starts without parameters, key and output space.
    text_valid = 1;
    repeat (5) @(negedge clk);
    chk(!working, "started without parameters/key");
    params_ready = 1;
    repeat (3) @(negedge clk);
    chk(!working, "started without key");
    key_ready = 1; out_free = 0;
    repeat (3) @(negedge clk);
    chk(!working, "started without output space");
    out_free = 2;
    @(negedge clk);
    chk(working, "did not start");
    text_valid = 0;
    while (working) @(negedge clk);
    for (int kl = 0; kl < 3; kl++)
      for (int m = 0; m < 4; m++) stream(kl, m[0], m[1], 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
