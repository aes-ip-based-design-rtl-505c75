// caes_param_init: parameter initialization engine.
//
// Receives the ten 32-bit parameter words and, with one shared 8x8 matrix
// product unit (eight 8-bit matrix multipliers), prepares in 18 steps the
// merged matrices used by the cipher engine and the key generator.
// Word order and computation schedule (step = word number, then free-running
// clock cycles 11..18 after the last word):
//   1  {16'h0, c_A, m(x)[7:0]}          m, c_A stored
//   2  {c0, c1, c2, c3}                  C_cj = [xtime^0(cj) .. xtime^7(cj)]
//   3,4  A^-1 (high, low half)
//   5,6  delta'                          step 6: delta'*A^-1
//   7,8  delta'^-1                       step 7: c'_A = delta'*A^-1*c_A
//   9,10 A                               step 10: A*delta'^-1
//   11..14  enc: delta'*C_cj          dec: delta'*A^-1*C_cj
//   15..18  enc: (.)*A*delta'^-1      dec: (.)*delta'^-1
// A 64-bit matrix is eight columns, column j in bits 8j+7..8j; the first
// word of a pair carries columns 7..4.  In decryption mode the host supplies
// the InvMixColumns row vector d(x) as {c0..c3}.  ready rises after step 18
// and falls when word 1 of a new set arrives.  Temporary values reuse the
// halves of the destination registers, so the storage is 8 64-bit and 3
// 8-bit registers.
module caes_param_init
  import caes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ende,       // mode latched for this initialization
  input  logic         pw_valid,   // parameter word strobe
  input  logic [3:0]   pw_idx,     // 0..9 = word 1..10
  input  word_t        pw_data,
  output caes_params_t prm,
  output logic         ready
);
  logic [4:0] cnt;      // steps completed, 0..18
  mat8_t      m1, m2, prod;
  mat8_t      cc [4];   // C_cj from the xtime unit

  // xtime^i(c_j), 0 <= i <= 7, with the stored m(x).
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      byte_t t;
      t = pw_data[31 - 8*j -: 8];
      for (int i = 0; i < 8; i++) begin
        cc[j][8*i +: 8] = t;
        t = xtime_m(t, prm.m);
      end
    end
  end

  // Operand selection of the shared matrix product unit.
  always_comb begin
    m1 = '0;
    m2 = '0;
    if (pw_valid) begin
      case (pw_idx)
        4'd5: begin m1 = {prm.d[63:32], pw_data};   m2 = prm.dai; end
        4'd6: begin m1 = prm.dai;                   m2 = {56'h0, prm.ca}; end
        4'd9: begin m1 = {prm.adi[63:32], pw_data}; m2 = prm.di; end
        default: ;
      endcase
    end else if (cnt >= 5'd10 && cnt < 5'd14) begin
      m1 = ende ? prm.dai : prm.d;
      m2 = prm.mc[cnt - 5'd10];
    end else if (cnt >= 5'd14 && cnt < 5'd18) begin
      m1 = prm.mc[cnt - 5'd14];
      m2 = ende ? prm.di : prm.adi;
    end
  end

  always_comb prod = matmul(m1, m2);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prm <= '0;
      cnt <= '0;
    end else if (pw_valid) begin
      cnt <= 5'(pw_idx) + 5'd1;
      case (pw_idx)
        4'd0: begin prm.m <= pw_data[7:0]; prm.ca <= pw_data[15:8]; end
        4'd1: for (int j = 0; j < 4; j++) prm.mc[j] <= cc[j];
        4'd2: prm.dai[63:32] <= pw_data;
        4'd3: prm.dai[31:0]  <= pw_data;
        4'd4: prm.d[63:32]   <= pw_data;
        4'd5: begin prm.d[31:0] <= pw_data; prm.dai <= prod; end
        4'd6: begin prm.cap <= prod[7:0]; prm.di[63:32] <= pw_data; end
        4'd7: prm.di[31:0]   <= pw_data;
        4'd8: prm.adi[63:32] <= pw_data;
        4'd9: prm.adi        <= prod;
        default: ;
      endcase
    end else if (cnt >= 5'd10 && cnt < 5'd18) begin
      cnt <= cnt + 5'd1;
      if (cnt < 5'd14) prm.mc[cnt - 5'd10] <= prod;
      else             prm.mc[cnt - 5'd14] <= prod;
    end
  end

  assign ready = (cnt == 5'd18);

  a_in_order: assert property (@(posedge clk) disable iff (rst)
    pw_valid |-> (pw_idx == 4'd0 || 5'(pw_idx) == cnt));
endmodule
