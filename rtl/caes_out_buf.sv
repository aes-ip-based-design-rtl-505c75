// caes_out_buf: output interface, two 128-bit ping-pong buffers.
//
// The cipher engine writes a finished block into the buffer selected by the
// write pointer (wr, only when free_cnt > 0) while the other buffer is read
// out to the 32-bit bus.  Reading: while oe is high and the read-side buffer
// is full, rdata carries its next word (most significant word first) and
// rdone is high; each such cycle consumes one word, and after the fourth the
// buffer is empty again.  rdone/rdata follow oe combinationally; the word
// pointer advances on the clock edge.
module caes_out_buf
  import caes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       wr,
  input  block_t     wdata,
  input  logic       oe,
  output logic       rdone,
  output word_t      rdata,
  output logic [1:0] free_cnt
);
  block_t     buf_q [2];
  logic [1:0] full;
  logic       wsel, rsel;
  logic [1:0] rptr;

  assign rdone    = oe && full[rsel];
  assign rdata    = buf_q[rsel][127 - 32*rptr -: 32];
  assign free_cnt = 2'(!full[0]) + 2'(!full[1]);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      buf_q[0] <= '0;
      buf_q[1] <= '0;
      full     <= '0;
      wsel     <= 1'b0;
      rsel     <= 1'b0;
      rptr     <= '0;
    end else begin
      if (wr) begin
        buf_q[wsel] <= wdata;
        full[wsel]  <= 1'b1;
        wsel        <= ~wsel;
      end
      if (rdone) begin
        rptr <= rptr + 2'd1;
        if (rptr == 2'd3) begin
          full[rsel] <= 1'b0;
          rsel       <= ~rsel;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    wr |-> !full[wsel]);
endmodule
