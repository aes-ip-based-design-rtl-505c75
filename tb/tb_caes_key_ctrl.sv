// tb_caes_key_ctrl: the key expansion controller.  Checks that a key load in
// encryption mode makes the key ready at once, that in decryption mode the
// controller issues load_init and Nr-1 forward steps (s = 1..Nr-1), then a
// capture, before key_ready, and that a block then yields the control
// sequence load_init s=0 / steps s=1..Nr-1 (encryption) or load_final
// s=Nr-1 / backward steps s=Nr-2..0 (decryption).  key_start must drop
// key_ready.
module tb_caes_key_ctrl;
  import caes_pkg::*;

  logic clk = 0, rst = 1;
  keylen_e keylen = KL128;
  logic ende = 0, key_start = 0, key_loaded = 0, blk_load = 0, blk_step = 0;
  logic kg_load_init, kg_load_final, kg_step, kg_dir, kg_cap_final, key_ready;
  logic [3:0] kg_s;
  int checks = 0, failures = 0;

  caes_key_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(bit li, bit lf, bit st, bit dr, int sv, bit cap, string what);
    #1;
    checks++;
    if (kg_load_init !== li || kg_load_final !== lf || kg_step !== st || kg_cap_final !== cap ||
        ((li || lf || st) && (kg_dir !== dr || kg_s !== 4'(sv)))) begin
      failures++;
      $display("%s: li=%b lf=%b st=%b dir=%b s=%0d cap=%b", what, kg_load_init, kg_load_final,
               kg_step, kg_dir, kg_s, kg_cap_final);
    end
  endtask

  task automatic run(int kl, bit dec);
    int nr = kl == 1 ? 12 : kl == 2 ? 14 : 10;
    @(negedge clk);
    keylen = keylen_e'(kl); ende = dec;
    key_start = 1; @(negedge clk); key_start = 0;
    checks++; if (key_ready) begin failures++; $display("ready after key_start"); end
    key_loaded = 1; @(negedge clk); key_loaded = 0;
    if (dec) begin
      for (int i = 0; i < nr; i++) begin
        checks++; if (key_ready) begin failures++; $display("ready too early"); end
        expect_ctl(i == 0, 0, i != 0, 0, i, 0, $sformatf("final gen %0d", i));
        @(negedge clk);
      end
      expect_ctl(0, 0, 0, 0, 0, 1, "capture");
      @(negedge clk);
    end
    checks++; if (!key_ready) begin failures++; $display("not ready kl=%0d dec=%0d", kl, dec); end
    for (int b = 0; b < 2; b++) begin
      blk_load = 1;
      expect_ctl(!dec, dec, 0, dec, dec ? nr - 1 : 0, 0, "block load");
      @(negedge clk); blk_load = 0;
      for (int r = 1; r < nr; r++) begin
        blk_step = 1;
        expect_ctl(0, 0, 1, dec, dec ? nr - 1 - r : r, 0, $sformatf("step %0d", r));
        @(negedge clk); blk_step = 0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int kl = 0; kl < 3; kl++)
      for (int dec = 0; dec < 2; dec++) run(kl, dec[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
