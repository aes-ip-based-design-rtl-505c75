// caes_main_ctrl: main controller of the C-AES coprocessor, with the CBC
// chaining register.
//
// A block starts (blk_load, take) when the input buffer holds a text block,
// the parameters and the initial/final key are ready and an output buffer is
// free.  The engine then runs rounds 1..Nr, one per clock: blk_step in
// rounds 1..Nr-1, and in round Nr the result is written to the output buffer
// (out_wr).  If at that moment another block is waiting and both output
// buffers are free, it is loaded in the same cycle, so back-to-back blocks
// take Nr cycles each (10/12/14); in CBC encryption the next block starts
// one cycle later, Nr+1 cycles per block.  'working' is high while a block is in the
// engine.
// CBC (cbc = 1): encryption feeds text ^ chain to the engine and the
// ciphertext becomes the new chain value; decryption outputs result ^ chain
// and the received ciphertext becomes the new chain value.  The chain
// register is loaded from the IV register map when a new IV arrives.
module caes_main_ctrl
  import caes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  keylen_e    keylen,
  input  logic       ende,
  input  logic       cbc,
  input  logic       text_valid,
  input  block_t     text,
  input  block_t     iv,
  input  logic       iv_loaded,
  input  logic       params_ready,
  input  logic       key_ready,
  input  logic [1:0] out_free,
  input  block_t     eng_dout,
  output logic       take,
  output logic       blk_load,
  output logic       blk_step,
  output block_t     eng_din,
  output logic       out_wr,
  output block_t     out_data,
  output logic       working
);
  logic [3:0] rnd;       // current round, 1..Nr
  logic [3:0] nr;
  logic       last;
  block_t     chain, ct_hold;
  logic       can_start;

  assign nr        = 4'(nr_of(keylen));
  assign last      = working && rnd == nr;
  assign can_start = text_valid && params_ready && key_ready;

  always_comb begin
    blk_step = working && !last;
    out_wr   = last;
    // Back-to-back start is not used in CBC encryption, whose next input
    // depends on the ciphertext being written in this cycle.
    blk_load = (!working && can_start && out_free != 2'd0) ||
               (last && can_start && out_free == 2'd2 && !(cbc && !ende));
    take     = blk_load;
    eng_din  = text ^ ((cbc && !ende) ? chain : '0);
    out_data = eng_dout ^ ((cbc && ende) ? chain : '0);
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      working <= 1'b0;
      rnd     <= '0;
      chain   <= '0;
      ct_hold <= '0;
    end else begin
      if (blk_load) begin
        working <= 1'b1;
        rnd     <= 4'd1;
        ct_hold <= text;
      end else if (last) begin
        working <= 1'b0;
      end else if (blk_step) begin
        rnd <= rnd + 4'd1;
      end
      if (iv_loaded)  chain <= iv;
      else if (last)  chain <= ende ? ct_hold : eng_dout;
    end
  end

  a_out_space: assert property (@(posedge clk) disable iff (rst)
    out_wr |-> out_free != 2'd0);
endmodule
