// caes_top: configurable-AES (C-AES) coprocessor.
//
// AES encryption/decryption (ECB or CBC; 128/192/256-bit keys) in which the
// irreducible polynomial m(x), the affine matrix and constant of SubBytes and
// the MixColumns row vector are run-time parameters.  Blocks:
//   caes_io_if         interface controller, WADDR, key/IV/text register map
//   caes_param_init    parameter initialization engine (18-step schedule)
//   caes_main_ctrl     block sequencing, round counter, CBC chaining
//   caes_key_ctrl      key expansion controller
//   caes_keygen        3-in-1 on-the-fly round key generator
//   caes_cipher_engine merged SubBytes/MixColumns round datapath
//   caes_out_buf       two 128-bit output buffers
// Pins follow the coprocessor's pin list (CLK, RESET, Key Change, CBC,
// Key Length, READY, WDATA, RDONE, RDATA, Wait Buffer, Working, OE); the
// ende pin (0 encrypt, 1 decrypt) is this design's addition, since the pin
// list has no processing-direction input.  RESET is asynchronous, active
// high, and makes the next transfer a full initialization (parameters, key,
// IV in CBC mode, text).  One block takes Nr clock cycles in the engine.
module caes_top
  import caes_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       key_change,
  input  logic       cbc,
  input  logic [1:0] key_length,
  input  logic       ende,
  input  logic       ready,
  input  word_t      wdata,
  output logic       rdone,
  output word_t      rdata,
  output logic       wait_buffer,
  output logic       working,
  input  logic       oe
);
  logic         cbc_q, ende_q;
  keylen_e      kl_q;
  logic         pw_valid;
  logic [3:0]   pw_idx;
  word_t        pw_data;
  logic [255:0] key;
  logic         key_start, key_loaded, iv_loaded, text_valid, take;
  block_t       iv, text;
  caes_params_t prm;
  logic         params_ready, key_ready;
  logic [1:0]   out_free;
  block_t       eng_din, eng_dout, out_data, rk, final_rk;
  logic         blk_load, blk_step, out_wr;
  logic         kg_load_init, kg_load_final, kg_step, kg_dir, kg_cap_final;
  logic [3:0]   kg_s;

  caes_io_if u_io (
    .clk, .rst(reset), .ready, .wdata, .key_change,
    .cbc_in(cbc), .keylen_in(keylen_e'(key_length)), .ende_in(ende),
    .engine_busy(working), .take, .wait_buffer,
    .cbc(cbc_q), .keylen(kl_q), .ende(ende_q),
    .pw_valid, .pw_idx, .pw_data,
    .key, .key_start, .key_loaded, .iv, .iv_loaded, .text, .text_valid);

  caes_param_init u_pinit (
    .clk, .rst(reset), .ende(ende_q), .pw_valid, .pw_idx, .pw_data,
    .prm, .ready(params_ready));

  caes_main_ctrl u_main (
    .clk, .rst(reset), .keylen(kl_q), .ende(ende_q), .cbc(cbc_q),
    .text_valid, .text, .iv, .iv_loaded, .params_ready, .key_ready,
    .out_free, .eng_dout, .take, .blk_load, .blk_step, .eng_din,
    .out_wr, .out_data, .working);

  caes_key_ctrl u_kctrl (
    .clk, .rst(reset), .keylen(kl_q), .ende(ende_q),
    .key_start, .key_loaded, .blk_load, .blk_step,
    .kg_load_init, .kg_load_final, .kg_step, .kg_dir, .kg_s,
    .kg_cap_final, .key_ready);

  caes_keygen u_kgen (
    .clk, .rst(reset), .keylen(kl_q), .prm, .init_key(key),
    .load_init(kg_load_init), .load_final(kg_load_final), .step(kg_step),
    .dir(kg_dir), .s(kg_s), .cap_final(kg_cap_final),
    .rk, .final_rk);

  // Initial round key for encryption (K0), final round key for decryption.
  block_t ik;
  assign ik = ende_q ? final_rk : key[255:128];

  caes_cipher_engine u_eng (
    .clk, .rst(reset), .prm, .ende(ende_q),
    .load(blk_load), .step(blk_step), .din(eng_din), .ik, .rk,
    .dout(eng_dout));

  caes_out_buf u_obuf (
    .clk, .rst(reset), .wr(out_wr), .wdata(out_data), .oe,
    .rdone, .rdata, .free_cnt(out_free));
endmodule
