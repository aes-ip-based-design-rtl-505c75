// caes_io_if: input side of the I/O interface -- interface controller,
// WADDR pointer, register map for key and IV, and the 32-to-128-bit text
// input buffer.
//
// Each accepted write (ready high, wait_buffer low) stores wdata at the
// address WADDR points to, and WADDR walks through the segments
//   parameters (10 words) -> key (4/6/8) -> IV (4, CBC only) -> text (4).
// Which segments a transfer sequence covers is decided when its first word
// arrives: after reset the full set starting with the parameters; with the
// Key Change pin high the key (and IV in CBC mode); otherwise the text only.
// The cbc and key_len pins are latched at the start of a sequence that
// carries the key; ende only at the start of a full initialization, since
// the prepared parameters depend on the direction.  Parameter words are
// forwarded to the parameter initialization engine as they arrive (pw_*).
// After the fourth text word the block is held (text_valid) until the main
// controller takes it; meanwhile wait_buffer is high and writes are not
// accepted.  wait_buffer is also high before a key or parameter sequence
// while the engine is still working or a block is pending, so that key
// material never changes under a running block.
module caes_io_if
  import caes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ready,        // WDATA valid
  input  word_t        wdata,
  input  logic         key_change,
  input  logic         cbc_in,
  input  keylen_e      keylen_in,
  input  logic         ende_in,
  input  logic         engine_busy,
  input  logic         take,         // main controller took the text block
  output logic         wait_buffer,
  // latched mode
  output logic         cbc,
  output keylen_e      keylen,
  output logic         ende,
  // parameter words
  output logic         pw_valid,
  output logic [3:0]   pw_idx,
  output word_t        pw_data,
  // key and IV register map
  output logic [255:0] key,
  output logic         key_start,
  output logic         key_loaded,
  output block_t       iv,
  output logic         iv_loaded,
  // text block
  output block_t       text,
  output logic         text_valid
);
  typedef enum logic [2:0] {SEG_IDLE, SEG_PARAM, SEG_KEY, SEG_IV, SEG_TEXT} seg_e;

  seg_e       seg, seg_w;       // registered segment / segment of this write
  logic [3:0] waddr, waddr_w;   // word index inside the segment
  logic       init_pending;
  logic       accept;
  logic [3:0] nk_w;
  logic       cbc_w;
  keylen_e    kl_w;

  assign wait_buffer = text_valid ||
                       (seg == SEG_IDLE && (init_pending || key_change) && engine_busy);
  assign accept = ready && !wait_buffer;

  // Segment and mode that apply to the current write.
  always_comb begin
    seg_w   = seg;
    waddr_w = waddr;
    cbc_w   = cbc;
    kl_w    = keylen;
    if (seg == SEG_IDLE) begin
      waddr_w = '0;
      if (init_pending)    begin seg_w = SEG_PARAM; cbc_w = cbc_in; kl_w = keylen_in; end
      else if (key_change) begin seg_w = SEG_KEY;   cbc_w = cbc_in; kl_w = keylen_in; end
      else                       seg_w = SEG_TEXT;
    end
    nk_w = 4'(nk_of(kl_w));
  end

  assign pw_valid   = accept && seg_w == SEG_PARAM;
  assign pw_idx     = waddr_w;
  assign pw_data    = wdata;
  assign key_start  = accept && seg_w == SEG_KEY && waddr_w == 4'd0;
  assign key_loaded = accept && seg_w == SEG_KEY && waddr_w == nk_w - 4'd1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      seg          <= SEG_IDLE;
      waddr        <= '0;
      init_pending <= 1'b1;
      cbc          <= 1'b0;
      keylen       <= KL128;
      ende         <= 1'b0;
      key          <= '0;
      iv           <= '0;
      iv_loaded    <= 1'b0;
      text         <= '0;
      text_valid   <= 1'b0;
    end else begin
      iv_loaded <= 1'b0;
      if (take) text_valid <= 1'b0;
      if (accept) begin
        if (seg == SEG_IDLE && init_pending) ende <= ende_in;
        cbc    <= cbc_w;
        keylen <= kl_w;
        seg    <= seg_w;
        waddr  <= waddr_w + 4'd1;
        case (seg_w)
          SEG_PARAM: begin
            init_pending <= 1'b0;
            if (waddr_w == 4'(PARAM_WORDS - 1)) begin seg <= SEG_KEY; waddr <= '0; end
          end
          SEG_KEY: begin
            key[255 - 32*waddr_w -: 32] <= wdata;
            if (waddr_w == nk_w - 4'd1) begin
              seg   <= cbc_w ? SEG_IV : SEG_TEXT;
              waddr <= '0;
            end
          end
          SEG_IV: begin
            iv[127 - 32*waddr_w -: 32] <= wdata;
            if (waddr_w == 4'd3) begin seg <= SEG_TEXT; waddr <= '0; iv_loaded <= 1'b1; end
          end
          SEG_TEXT: begin
            text[127 - 32*waddr_w -: 32] <= wdata;
            if (waddr_w == 4'd3) begin seg <= SEG_IDLE; waddr <= '0; text_valid <= 1'b1; end
          end
          default: ;
        endcase
      end
    end
  end

  a_no_write_when_waiting: assert property (@(posedge clk) disable iff (rst)
    !(take && !text_valid));
endmodule
